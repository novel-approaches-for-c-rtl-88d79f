// acal_alu: one address calculation ALU of the ACAL.
//
// Turns a vertex index into the byte address of one attribute of that vertex:
//   rel  = index * stride + attribute offset
//   addr = base + rel            (kept to ADDR_W bits)
//   oob  = rel + size > limit    (the attribute is not wholly inside the buffer)
// and passes the attribute size along. The unit's existence, its pairing (two
// ALUs) and its outputs (address, size, status, valid) follow the published
// block diagram; the formula itself and the out-of-bounds test are this
// design's choice, the simplest one that yields a vertex attribute address.
//
// Purely combinational; the ACAL registers its results.
module acal_alu
  import vaag_pkg::*;
(
  input  logic             vtx_valid,
  input  logic [IDX_W-1:0] vtx_index,
  input  attr_desc_t       desc,
  output attr_t            attr
);

  localparam int unsigned REL_W = IDX_W + STRIDE_W + 1;

  logic [REL_W-1:0] rel;
  logic [REL_W-1:0] rel_end;

  always_comb begin
    rel        = REL_W'(vtx_index) * REL_W'(desc.stride) + REL_W'(desc.offset);
    rel_end    = rel + REL_W'(desc.size);
    attr.valid = vtx_valid;
    attr.addr  = desc.base + rel[ADDR_W-1:0];
    attr.size  = desc.size;
    attr.oob   = rel_end > REL_W'(desc.limit);
  end

endmodule
