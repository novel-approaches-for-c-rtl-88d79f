// clsc: address coalescing unit.
//
// Takes Attribute Address #0 and #1 plus the warp end and block end flags of
// the pair, and merges consecutive addresses that share their MSB_W most
// significant bits into one coalesced record (common MSB + the offset of each
// merged address). A three-state FSM decides what happens to each address:
//   IDLE      nothing cached
//   Non-COAL  one address cached, waiting for a partner
//   COAL      the cached address has absorbed at least one other
// Out-of-bounds addresses are never merged and flush the cache; an address
// that crosses a line flushes the cache and is cached on its own; a differing
// MSB flushes the cache; a warp or block end flushes the cache with the flag
// attached (as a flag-only record when nothing is cached). In COAL, up to
// cfg_max_coal further addresses are merged before the record is sent; with
// cfg_max_coal == 0 a further match is not merged (it starts a new record).
// The states, their eight transitions and the address layout follow the
// published design; the end handling in IDLE and COAL, the record format and
// the micro-architecture below are this design's choice.
//
// Micro-architecture: each accepted pair is handled in one clock. Address #0,
// then address #1, then the end flag (when set) go through vaag_pkg's step
// functions in a chain, giving up to MAX_PUSH records, which are written into
// an output FIFO at once. The unit takes a pair only while the FIFO has room
// for MAX_PUSH more records, and sends one record per clock. A record
// produced by the pair accepted at a clock edge is visible at out_* right
// after that edge at the earliest (one cycle latency); when several records
// are produced they leave on successive clocks, so the coalescing latency
// depends on the addresses. All registers, the cached address included, are
// reset (rst_n, active low, synchronous) and cleared when they are flushed.
//
// Interface: valid/ready on both sides; out is held stable while
// out_valid && !out_ready. state shows the FSM state for observation.
module clsc
  import vaag_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8   // output records buffered
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [MAXC_W-1:0]     cfg_max_coal,   // max coalesce number
  input  logic                  in_valid,
  output logic                  in_ready,
  input  attr_t [1:0]           attr,
  input  logic                  warp_end,
  input  logic                  block_end,
  output logic                  out_valid,
  input  logic                  out_ready,
  output clsc_out_t             out,
  output clsc_state_e           state
);

  // Worst case per pair: #0 out of bounds in Non-COAL (2), #1 out of bounds
  // in IDLE (1), end flag (1).
  localparam int unsigned MAX_PUSH = 4;
  localparam int unsigned PTR_W    = $clog2(FIFO_DEPTH);
  localparam int unsigned LVL_W    = $clog2(FIFO_DEPTH + 1);

  clsc_ctx_t                    ctx_q, ctx_d;
  clsc_out_t [MAX_PUSH-1:0]     push_rec;
  logic [2:0]                   n_push;
  logic [MAXC_W-1:0]            max_coal;

  clsc_out_t                    mem [FIFO_DEPTH];
  logic [PTR_W-1:0]             wr_ptr, rd_ptr;
  logic [LVL_W-1:0]             level;
  logic                         take, pop;

  assign max_coal = (cfg_max_coal > MAXC_W'(MAX_COAL)) ? MAXC_W'(MAX_COAL)
                                                        : cfg_max_coal;
  assign in_ready  = (level <= LVL_W'(FIFO_DEPTH - MAX_PUSH));
  assign take      = in_valid && in_ready;
  assign out_valid = (level != '0);
  assign out       = mem[rd_ptr];
  assign pop       = out_valid && out_ready;
  assign state     = ctx_q.state;

  // Chain the three events of one pair through the FSM.
  always_comb begin
    clsc_step_t s;
    clsc_ctx_t  c;
    c        = ctx_q;
    n_push   = '0;
    push_rec = '0;
    for (int e = 0; e < 3; e++) begin
      s = '0;
      s.ctx = c;
      if (e < 2) begin
        if (attr[e].valid) s = clsc_step_addr(c, attr[e], max_coal);
      end else if (warp_end || block_end) begin
        s = clsc_step_end(c.state, c.cache, warp_end, block_end);
      end
      if (s.n_out >= 2'd1) begin
        push_rec[n_push[1:0]] = s.out0;
        n_push = n_push + 3'd1;
      end
      if (s.n_out == 2'd2) begin
        push_rec[n_push[1:0]] = s.out1;
        n_push = n_push + 3'd1;
      end
      c = s.ctx;
    end
    ctx_d = c;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctx_q  <= '0;
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (take) begin
        ctx_q  <= ctx_d;
        wr_ptr <= wr_ptr + PTR_W'(n_push);
      end
      if (pop) rd_ptr <= rd_ptr + PTR_W'(1);
      level <= level + (take ? LVL_W'(n_push) : '0) - (pop ? LVL_W'(1) : '0);
    end
  end

  // Record storage; entries are only read after they are written.
  always_ff @(posedge clk) begin
    if (take) begin
      for (int i = 0; i < MAX_PUSH; i++) begin
        if (3'(i) < n_push) mem[wr_ptr + PTR_W'(i)] <= push_rec[i];
      end
    end
  end

  // Handshake rules.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out));
  a_push_bound: assert property (@(posedge clk) disable iff (!rst_n)
    take |-> n_push <= 3'(MAX_PUSH));
  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n)
    ctx_q.cache.count <= CNT_W'(SLOTS));

  initial begin
    assert (FIFO_DEPTH >= MAX_PUSH && (FIFO_DEPTH & (FIFO_DEPTH - 1)) == 0)
      else $error("FIFO_DEPTH must be a power of two of at least %0d", MAX_PUSH);
  end

endmodule
