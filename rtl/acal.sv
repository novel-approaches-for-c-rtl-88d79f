// acal: address calculation unit, two ALUs side by side.
//
// Each accepted request carries two vertex indices (each with its own valid
// bit) and the warp end / block end flags of that pair. ALU #0 and ALU #1
// compute Attribute Address #0 and #1 with the shared attribute descriptor;
// the results and the two flags are registered together, so a request leaves
// one cycle after it is accepted. The output stage is a plain valid/ready
// register: it takes a new request when it is empty or when its content is
// being taken in the same cycle (in_ready = !out_valid || out_ready).
// Two ALUs and the outputs follow the published block diagram; the one-stage
// pipeline, the handshake and the synchronous active-low reset (rst_n) are
// this design's choice.
module acal
  import vaag_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // request: two vertices per cycle
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [1:0]            vtx_valid,
  input  logic [1:0][IDX_W-1:0] vtx_index,
  input  logic                  warp_end,
  input  logic                  block_end,
  input  attr_desc_t            desc,
  // result: Attribute Address #0 and #1 plus the flags
  output logic                  out_valid,
  input  logic                  out_ready,
  output attr_t [1:0]           attr,
  output logic                  out_warp_end,
  output logic                  out_block_end
);

  attr_t [1:0] alu_attr;

  for (genvar i = 0; i < 2; i++) begin : g_alu
    acal_alu u_alu (
      .vtx_valid (vtx_valid[i]),
      .vtx_index (vtx_index[i]),
      .desc      (desc),
      .attr      (alu_attr[i])
    );
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      attr          <= '0;
      out_warp_end  <= 1'b0;
      out_block_end <= 1'b0;
    end else if (in_ready) begin
      out_valid     <= in_valid;
      attr          <= alu_attr;
      out_warp_end  <= warp_end;
      out_block_end <= block_end;
    end
  end

endmodule
