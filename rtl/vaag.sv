// vaag: vertex attribute address generator, top level.
//
// Two vertices enter per cycle. The ACAL (two ALUs) computes the byte address
// of the selected attribute of each vertex, with its size and out-of-bounds
// status, and passes the warp end and block end flags along; the CLSC merges
// addresses that share their most significant bits into coalesced records,
// one record per clock on its output. This ACAL -> CLSC structure follows the
// published block diagram.
//
// Timing: a request accepted at a clock edge is in the ACAL register after it
// and, when the CLSC takes it at the next edge, its first record can appear
// after that edge: two cycles from request to record at the earliest. Records
// wait in the CLSC while their address is cached for coalescing, so the
// latency depends on the addresses. Backpressure runs from out_ready through
// the CLSC and the ACAL to in_ready.
module vaag
  import vaag_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  attr_desc_t            desc,
  input  logic [MAXC_W-1:0]     cfg_max_coal,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [1:0]            vtx_valid,
  input  logic [1:0][IDX_W-1:0] vtx_index,
  input  logic                  warp_end,
  input  logic                  block_end,
  output logic                  out_valid,
  input  logic                  out_ready,
  output clsc_out_t             out,
  output clsc_state_e           clsc_state
);

  logic        a_valid, a_ready, a_warp_end, a_block_end;
  attr_t [1:0] a_attr;

  acal u_acal (
    .clk, .rst_n,
    .in_valid, .in_ready, .vtx_valid, .vtx_index, .warp_end, .block_end, .desc,
    .out_valid     (a_valid),
    .out_ready     (a_ready),
    .attr          (a_attr),
    .out_warp_end  (a_warp_end),
    .out_block_end (a_block_end)
  );

  clsc #(.FIFO_DEPTH(FIFO_DEPTH)) u_clsc (
    .clk, .rst_n, .cfg_max_coal,
    .in_valid  (a_valid),
    .in_ready  (a_ready),
    .attr      (a_attr),
    .warp_end  (a_warp_end),
    .block_end (a_block_end),
    .out_valid, .out_ready, .out,
    .state     (clsc_state)
  );

endmodule
