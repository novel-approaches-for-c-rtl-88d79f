// tb_vaag: end-to-end testbench of the vertex attribute address generator,
// top level at its default parameters.
//
// Streams warps of vertices (two per cycle) through ACAL and CLSC: runs of
// consecutive vertices, so that neighbouring attributes share their MSB and
// coalesce, mixed with scattered indices, idle lanes, buffers short enough to
// produce out-of-bounds addresses, and strides that make attributes cross a
// line. A warp end follows every WARP/2 requests and a block end every fourth
// warp. The max coalesce number changes between warps (0 included) and the
// output is stalled at random. The expected records come from the ALU formula
// and the sequential reference model in clsc_ref_pkg; every record is
// compared in order. Each mechanism (every FSM transition, the limit-0 mode,
// backpressure reaching the input) is counted and must happen at least once.
module tb_vaag;
  import vaag_pkg::*;
  import clsc_ref_pkg::*;

  localparam int WARP = 32;

  logic                  clk = 1'b0, rst_n;
  attr_desc_t            desc;
  logic [MAXC_W-1:0]     cfg_max_coal;
  logic                  in_valid, in_ready;
  logic [1:0]            vtx_valid;
  logic [1:0][IDX_W-1:0] vtx_index;
  logic                  warp_end, block_end;
  logic                  out_valid, out_ready;
  clsc_out_t             out;
  clsc_state_e           clsc_state;

  int checks = 0, failures = 0, records = 0, in_stalls = 0, limit0 = 0;
  clsc_ref model = new();
  // requests accepted by the ACAL, waiting to be applied to the model
  typedef struct { attr_t a0, a1; logic we, be; int maxc; } req_t;

  vaag dut (.*);
  always #5 clk = ~clk;

  function automatic attr_t ref_alu(logic v, logic [IDX_W-1:0] idx, attr_desc_t d);
    attr_t  a;
    longint rel;
    rel     = longint'(idx) * longint'(d.stride) + longint'(d.offset);
    a.valid = v;
    a.addr  = ADDR_W'(longint'(d.base) + rel);
    a.size  = d.size;
    a.oob   = (rel + longint'(d.size)) > longint'(d.limit);
    return a;
  endfunction

  // Monitor: at each falling edge compare the record taken at the next edge.
  always @(negedge clk) begin
    #1;
    if (rst_n && out_valid && out_ready) begin
      clsc_out_t e;
      checks++; records++;
      if (model.expq.size() == 0) begin
        failures++; $display("FAIL unexpected record msb=%h", out.msb);
      end else begin
        e = model.expq.pop_front();
        if (out !== e) begin
          failures++;
          $display("FAIL record %0d: msb=%h cnt=%0d we=%b, want msb=%h cnt=%0d we=%b",
                   records, out.msb, out.count, out.warp_end, e.msb, e.count, e.warp_end);
        end
      end
    end
  end

  // Sends one request; the model sees it when it is taken by the ACAL. Since
  // both units keep order and the ACAL only passes requests along, applying
  // the rules at that point gives the same record sequence.
  task automatic send(logic [1:0] v, logic [IDX_W-1:0] i0, logic [IDX_W-1:0] i1,
                      logic we, logic be);
    @(negedge clk);
    in_valid = 1'b1; vtx_valid = v; vtx_index[0] = i0; vtx_index[1] = i1;
    warp_end = we; block_end = be;
    out_ready = 1'($urandom_range(0, 3) != 0);
    #1;
    while (!in_ready) begin
      in_stalls++;
      @(negedge clk);
      out_ready = 1'($urandom_range(0, 3) != 0);
      #1;
    end
    @(posedge clk);
    begin
      int maxc;
      maxc = (int'(cfg_max_coal) > MAX_COAL) ? MAX_COAL : int'(cfg_max_coal);
      if (maxc == 0) limit0++;
      model.addr(ref_alu(v[0], i0, desc), maxc);
      model.addr(ref_alu(v[1], i1, desc), maxc);
      model.flags(we, be);
    end
    #1 in_valid = 1'b0;
  endtask

  initial begin
    automatic string need[$] = '{"1", "2.1", "2.2", "3", "4", "5.1", "5.2", "6",
                       "7.1", "7.2", "7.3", "8.1", "8.2"};
    int n_warps;
    n_warps = 120;
    rst_n = 0; in_valid = 0; out_ready = 1; vtx_valid = '0; vtx_index = '0;
    warp_end = 0; block_end = 0; cfg_max_coal = MAXC_W'(MAX_COAL);
    desc = '{base: 16'h0000, stride: 8'd16, offset: 8'd0, size: 5'd16, limit: 17'd65536};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int w = 0; w < n_warps; w++) begin
      int unsigned first;
      int mode;
      // a new attribute and limit for this warp, changed once the pipeline
      // (ACAL register and CLSC queue) has drained
      @(negedge clk) out_ready = 1'b1;
      repeat (12) @(negedge clk);
      begin
        int wait_cycles;
        wait_cycles = 0;
        while ((model.expq.size() != 0 || out_valid) && wait_cycles < 100) begin
          @(negedge clk);
          wait_cycles++;
        end
        checks++;
        if (wait_cycles == 100) begin
          failures++;
          $display("FAIL warp %0d: output and expected records out of step (%0d expected left)",
                   w, model.expq.size());
          model.expq.delete();
        end
      end
      mode = w % 4;
      desc.base   = ADDR_W'($urandom);
      desc.stride = STRIDE_W'((mode == 0) ? $urandom_range(1, 8) : $urandom_range(4, 64));
      desc.offset = AOFF_W'($urandom_range(0, 32));
      desc.size   = SIZE_W'($urandom_range(1, 16));
      desc.limit  = (mode == 3) ? (ADDR_W+1)'($urandom_range(50, 600))
                                : (ADDR_W+1)'(65536);
      cfg_max_coal = MAXC_W'((w % 5 == 4) ? 0 : $urandom_range(1, 3));
      first = $urandom_range(0, 200);
      for (int p = 0; p < WARP / 2; p++) begin
        logic [1:0] v;
        logic [IDX_W-1:0] i0, i1;
        v  = ($urandom_range(0, 9) == 0) ? 2'($urandom) : 2'b11;
        if (mode == 2 && $urandom_range(0, 2) == 0) begin
          i0 = IDX_W'($urandom_range(0, 4000));
          i1 = IDX_W'($urandom_range(0, 4000));
        end else begin
          i0 = IDX_W'(first + 2 * p);
          i1 = IDX_W'(first + 2 * p + 1);
        end
        send(v, i0, i1, p == WARP / 2 - 1, (p == WARP / 2 - 1) && (w % 4 == 3));
      end
    end
    @(negedge clk) out_ready = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (model.expq.size() != 0 || out_valid) begin
      failures++; $display("FAIL %0d records never came out", model.expq.size());
    end
    foreach (need[i]) begin
      checks++;
      if (!model.hit.exists(need[i])) begin
        failures++; $display("FAIL transition %s never happened", need[i]);
      end
    end
    checks++;
    if (in_stalls == 0 || limit0 == 0) begin
      failures++; $display("FAIL input stalls=%0d limit-0 requests=%0d", in_stalls, limit0);
    end
    foreach (model.hit[t]) $display("transition %-8s : %0d", t, model.hit[t]);
    $display("records %0d, input stall cycles %0d, requests with limit 0: %0d",
             records, in_stalls, limit0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
