// tb_clsc: self-checking testbench of the address coalescing unit.
//
// The reference model (clsc_ref_pkg) applies the coalescing rules one
// address at a time (address #0, then #1, then the end flag), written
// independently of the unit's step functions. Every record the unit sends is
// compared with the model's next expected record, and the FSM state is
// compared with the model's after every accepted pair.
//
// Phases:
//   1. latency: a record must be visible one cycle after its pair is taken;
//      when a pair sends two records, the second follows one cycle later.
//   2. the twelve four-transition paths IDLE -> ... -> IDLE of the state
//      diagram, one address (or end flag) per cycle, each path run several
//      times with randomly chosen events that cause the wanted transitions;
//      the state after every step is checked against the path.
//   3. random pairs with random backpressure and random max coalesce number.
// Every transition number 1..8 (and each sub-case) must be seen.
module tb_clsc;
  import vaag_pkg::*;
  import clsc_ref_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n;
  logic [MAXC_W-1:0] cfg_max_coal;
  logic              in_valid, in_ready;
  attr_t [1:0]       attr;
  logic              warp_end, block_end;
  logic              out_valid, out_ready;
  clsc_out_t         out;
  clsc_state_e       state;

  int checks = 0, failures = 0;

  clsc dut (.*);

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- model
  clsc_ref model = new();
  bit      rand_ready = 1'b0;

  // ---------------------------------------------------------------- driver
  task automatic send(attr_t a0, attr_t a1, logic we, logic be);
    int maxc;
    @(negedge clk);
    attr[0] = a0; attr[1] = a1; warp_end = we; block_end = be;
    in_valid = 1'b1;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    maxc = (int'(cfg_max_coal) > MAX_COAL) ? MAX_COAL : int'(cfg_max_coal);
    model.addr(a0, maxc);
    model.addr(a1, maxc);
    model.flags(we, be);
    @(negedge clk);
    in_valid = 1'b0;
    attr = '0; warp_end = 1'b0; block_end = 1'b0;
    checks++;
    if (int'(state) != model.state) begin
      failures++;
      $display("FAIL state: dut=%0d model=%0d", state, model.state);
    end
  endtask

  // ---------------------------------------------------------------- monitor
  always @(negedge clk) begin
    out_ready = rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
    #1;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (model.expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected record msb=%h count=%0d", out.msb, out.count);
      end else begin
        clsc_out_t e;
        e = model.expq.pop_front();
        if (out !== e) begin
          failures++;
          $display("FAIL record: dut msb=%h cnt=%0d off0=%h we=%b | exp msb=%h cnt=%0d off0=%h we=%b",
                   out.msb, out.count, out.offset[0], out.warp_end,
                   e.msb, e.count, e.offset[0], e.warp_end);
        end
      end
    end
  end

  // ---------------------------------------------------------------- stimulus helpers
  function automatic attr_t mk_attr(logic [5:0] msb, logic [9:0] off,
                                    logic [4:0] size, logic oob);
    attr_t a;
    a.valid = 1'b1; a.addr = {msb, off}; a.size = size; a.oob = oob;
    return a;
  endfunction

  function automatic attr_t in_line(logic [5:0] msb);
    return mk_attr(msb, 10'($urandom_range(0, 1000)), 5'($urandom_range(1, 16)), 1'b0);
  endfunction

  function automatic attr_t crossing(logic [5:0] msb);
    return mk_attr(msb, 10'($urandom_range(1017, 1023)), 5'd16, 1'b0);
  endfunction

  function automatic attr_t oob_addr();
    return mk_attr(6'($urandom), 10'($urandom), 5'($urandom_range(1, 16)), 1'b1);
  endfunction

  // One event that takes the model from its state to state `to`.
  task automatic step_to(int to);
    attr_t none = '0;
    logic [5:0] other = model.cache.msb + 6'($urandom_range(1, 63));
    int pick = $urandom_range(0, 2);
    case (model.state)
      IDLE: if (to == IDLE) send(oob_addr(), none, 0, 0);
            else            send(in_line(6'($urandom)), none, 0, 0);
      NCOL: if (to == IDLE) begin
              if (pick == 0) send(oob_addr(), none, 0, 0);
              else           send(none, none, pick == 1, pick == 2);
            end else if (to == NCOL) begin
              if (pick == 0) send(crossing(model.cache.msb), none, 0, 0);
              else           send(in_line(other), none, 0, 0);
            end else         send(in_line(model.cache.msb), none, 0, 0);
      default:
            if (to == COAL) send(in_line(model.cache.msb), none, 0, 0);
            else if (to == IDLE) begin
              if (pick == 0 && model.merges + 1 >= MAX_COAL) send(in_line(model.cache.msb), none, 0, 0);
              else send(oob_addr(), none, 0, 0);
            end else begin
              if (pick == 0) send(crossing(model.cache.msb), none, 0, 0);
              else           send(in_line(other), none, 0, 0);
            end
    endcase
  endtask

  // Appendix paths: states visited after each of four transitions.
  int paths [12][4] = '{
    '{IDLE, IDLE, IDLE, IDLE}, '{NCOL, IDLE, IDLE, IDLE},
    '{IDLE, NCOL, IDLE, IDLE}, '{IDLE, IDLE, NCOL, IDLE},
    '{NCOL, NCOL, IDLE, IDLE}, '{NCOL, IDLE, NCOL, IDLE},
    '{IDLE, NCOL, NCOL, IDLE}, '{NCOL, NCOL, NCOL, IDLE},
    '{NCOL, COAL, IDLE, IDLE}, '{NCOL, NCOL, COAL, IDLE},
    '{NCOL, COAL, NCOL, IDLE}, '{NCOL, COAL, COAL, IDLE}};

  task automatic drain();
    int n = 0;
    while (model.expq.size() != 0 && n < 200) begin @(negedge clk); n++; end
    repeat (3) @(negedge clk);
    checks++;
    if (model.expq.size() != 0 || out_valid) begin
      failures++;
      $display("FAIL drain: %0d records missing, out_valid=%b", model.expq.size(), out_valid);
    end
  endtask

  // ---------------------------------------------------------------- test
  initial begin
    automatic attr_t none = '0;
    attr_t a0, a1;
    automatic string need[$] = '{"1", "2.1", "2.2", "3", "4", "5.1", "5.2", "6",
                       "7.1", "7.2", "7.3", "8.1", "8.2", "end_idle", "end_coal"};
    rst_n = 1'b0; in_valid = 1'b0; attr = '0; warp_end = 0; block_end = 0;
    cfg_max_coal = MAXC_W'(MAX_COAL); out_ready = 1'b1;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;

    // 1. latency: two different MSBs, no cached address (one flushes, one is
    //    cached), then a warp end flushes the cached one.
    @(negedge clk);
    attr[0] = mk_attr(6'd3, 10'd8, 5'd4, 1'b0);
    attr[1] = mk_attr(6'd5, 10'd16, 5'd4, 1'b0);
    in_valid = 1'b1;
    @(posedge clk);
    model.addr(attr[0], MAX_COAL); model.addr(attr[1], MAX_COAL);
    #1 in_valid = 1'b0;
    checks++;
    if (!out_valid || out.msb != 6'd3) begin
      failures++; $display("FAIL latency: record not out one cycle after input");
    end
    send(none, none, 1'b1, 1'b0);
    drain();
    //    A cached address, then a pair that differs from it and within
    //    itself: the cached record leaves one cycle after the pair is taken,
    //    address #0 one cycle later, and address #1 stays cached.
    send(mk_attr(6'd7, 10'd0, 5'd4, 1'b0), none, 1'b0, 1'b0);
    @(negedge clk);
    attr[0] = mk_attr(6'd8, 10'd32, 5'd4, 1'b0);
    attr[1] = mk_attr(6'd9, 10'd64, 5'd4, 1'b0);
    in_valid = 1'b1;
    @(posedge clk);
    model.addr(attr[0], MAX_COAL); model.addr(attr[1], MAX_COAL);
    #1 in_valid = 1'b0;
    checks++;
    if (!out_valid || out.msb != 6'd7) begin
      failures++; $display("FAIL two-record timing: first record");
    end
    @(posedge clk); #1;
    checks++;
    if (!out_valid || out.msb != 6'd8 || state != ST_NCOL) begin
      failures++; $display("FAIL two-record timing: second record");
    end
    send(none, none, 1'b0, 1'b1);
    drain();

    // 2. the twelve paths, each several times
    for (int rep = 0; rep < 6; rep++) begin
      for (int p = 0; p < 12; p++) begin
        if (rep == 5 && p == 10) cfg_max_coal = '0;      // COAL -> Non-COAL by limit 0
        for (int s = 0; s < 4; s++) begin
          step_to(paths[p][s]);
          checks++;
          if (int'(state) != paths[p][s]) begin
            failures++;
            $display("FAIL path %0d step %0d: state %0d, want %0d", p + 1, s, state, paths[p][s]);
          end
        end
        cfg_max_coal = MAXC_W'(MAX_COAL);
      end
    end
    // transition 7.2 once more on purpose: COAL, limit 0, matching address
    step_to(NCOL); step_to(COAL);
    cfg_max_coal = '0;
    send(in_line(model.cache.msb), none, 0, 0);
    cfg_max_coal = MAXC_W'(MAX_COAL);
    step_to(COAL); send(none, none, 0, 1);   // end while coalescing
    send(none, none, 1, 1);                  // end while idle
    drain();

    // 3. random pairs, random backpressure
    rand_ready = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      logic [5:0] base_msb;
      base_msb = 6'($urandom_range(0, 3));
      if (i % 200 == 0) cfg_max_coal = MAXC_W'($urandom_range(0, 3));
      for (int l = 0; l < 2; l++) begin
        int k;
        attr_t a;
        k = $urandom_range(0, 19);
        if (k == 0)      a = oob_addr();
        else if (k == 1) a = crossing(base_msb);
        else if (k == 2) a = '0;
        else             a = in_line(6'($urandom_range(0, 1)) + base_msb);
        if (l == 0) a0 = a; else a1 = a;
      end
      send(a0, a1, $urandom_range(0, 15) == 0, $urandom_range(0, 31) == 0);
    end
    rand_ready = 1'b0;
    drain();

    foreach (need[i]) begin
      checks++;
      if (!model.hit.exists(need[i])) begin
        failures++; $display("FAIL transition %s never happened", need[i]);
      end
    end
    foreach (model.hit[t]) $display("transition %-8s : %0d", t, model.hit[t]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
