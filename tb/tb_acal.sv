// tb_acal: self-checking testbench of the two-ALU address calculation unit.
// Random request pairs under random backpressure. Each accepted request is
// turned into its expected pair of attribute addresses (formula worked out in
// the testbench) and the flags; outputs are compared in order. Also checks
// the one-cycle latency of an unstalled request and that a stalled output
// holds its value.
module tb_acal;
  import vaag_pkg::*;

  typedef struct packed {
    attr_t [1:0] attr;
    logic        we, be;
  } exp_t;

  logic                  clk = 1'b0, rst_n;
  logic                  in_valid, in_ready;
  logic [1:0]            vtx_valid;
  logic [1:0][IDX_W-1:0] vtx_index;
  logic                  warp_end, block_end;
  attr_desc_t            desc;
  logic                  out_valid, out_ready;
  attr_t [1:0]           attr;
  logic                  out_warp_end, out_block_end;
  int checks = 0, failures = 0, stalls = 0;
  exp_t expq[$];

  acal dut (.*);
  always #5 clk = ~clk;

  function automatic attr_t ref_alu(logic v, logic [IDX_W-1:0] idx, attr_desc_t d);
    attr_t  a;
    longint rel = longint'(idx) * longint'(d.stride) + longint'(d.offset);
    a.valid = v;
    a.addr  = ADDR_W'(longint'(d.base) + rel);
    a.size  = d.size;
    a.oob   = (rel + longint'(d.size)) > longint'(d.limit);
    return a;
  endfunction

  // driver and scoreboard, all sampled just after the falling edge
  always @(negedge clk) begin
    if (rst_n) begin
      #1;
      if (out_valid && out_ready) begin
        exp_t e;
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL unexpected output");
        end else begin
          e = expq.pop_front();
          if (attr !== e.attr || out_warp_end !== e.we || out_block_end !== e.be) begin
            failures++;
            $display("FAIL output: addr %h %h want %h %h", attr[0].addr, attr[1].addr,
                     e.attr[0].addr, e.attr[1].addr);
          end
        end
      end
      if (out_valid && !out_ready) stalls++;
      if (in_valid && in_ready) begin
        exp_t e;
        e.attr[0] = ref_alu(vtx_valid[0], vtx_index[0], desc);
        e.attr[1] = ref_alu(vtx_valid[1], vtx_index[1], desc);
        e.we = warp_end; e.be = block_end;
        expq.push_back(e);
      end
    end
  end

  initial begin
    rst_n = 0; in_valid = 0; out_ready = 0; vtx_valid = '0; vtx_index = '0;
    warp_end = 0; block_end = 0;
    desc = '{base: 16'h0400, stride: 8'd12, offset: 8'd4, size: 5'd8, limit: 17'd4000};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // latency: one request, output ready
    @(negedge clk);
    in_valid = 1; vtx_valid = 2'b11; vtx_index[0] = 16'd10; vtx_index[1] = 16'd11;
    out_ready = 1;
    @(posedge clk); #2;
    in_valid = 0;
    checks++;
    if (!out_valid || attr[0].addr != 16'h0400 + 16'd124 || attr[1].addr != 16'h0400 + 16'd136) begin
      failures++; $display("FAIL latency: out_valid=%b addr0=%h", out_valid, attr[0].addr);
    end
    // random traffic
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (!(in_valid && !in_ready)) begin
        in_valid     = 1'($urandom_range(0, 3) != 0);
        vtx_valid    = 2'($urandom);
        vtx_index[0] = IDX_W'($urandom_range(0, 500));
        vtx_index[1] = IDX_W'($urandom_range(0, 500));
        warp_end     = 1'($urandom_range(0, 7) == 0);
        block_end    = 1'($urandom_range(0, 15) == 0);
        if (i % 500 == 0) begin
          desc.base   = ADDR_W'($urandom);
          desc.stride = STRIDE_W'($urandom_range(1, 32));
          desc.size   = SIZE_W'($urandom_range(1, 16));
          desc.limit  = (ADDR_W+1)'($urandom_range(100, 9000));
        end
      end
      out_ready = 1'($urandom_range(0, 2) != 0);
    end
    @(negedge clk);
    in_valid = 0; out_ready = 1;
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0 || stalls == 0) begin
      failures++; $display("FAIL end: %0d pending, %0d stalls", expq.size(), stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a stalled output holds
  attr_t [1:0] held;
  logic        was_stalled = 1'b0;
  always @(posedge clk) begin
    if (was_stalled && out_valid) begin
      checks++;
      if (attr !== held) begin failures++; $display("FAIL stalled output changed"); end
    end
    was_stalled <= out_valid && !out_ready && rst_n;
    held        <= attr;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
