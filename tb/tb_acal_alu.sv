// tb_acal_alu: self-checking testbench of one address calculation ALU.
// Random descriptors and vertex indices, plus corner cases at the buffer
// limit; the expected address and out-of-bounds status are worked out with
// 64-bit integer arithmetic in the testbench.
module tb_acal_alu;
  import vaag_pkg::*;

  logic             vtx_valid;
  logic [IDX_W-1:0] vtx_index;
  attr_desc_t       desc;
  attr_t            attr;
  int checks = 0, failures = 0;
  int n_oob = 0, n_in = 0;

  acal_alu dut (.*);

  task automatic check();
    longint rel, exp_addr;
    bit     exp_oob;
    #1;
    rel      = longint'(vtx_index) * longint'(desc.stride) + longint'(desc.offset);
    exp_addr = (longint'(desc.base) + rel) % 65536;
    exp_oob  = (rel + longint'(desc.size)) > longint'(desc.limit);
    checks++;
    if (attr.valid !== vtx_valid || longint'(attr.addr) != exp_addr ||
        attr.size !== desc.size || attr.oob !== exp_oob) begin
      failures++;
      $display("FAIL idx=%0d stride=%0d off=%0d base=%h: addr=%h oob=%b, want %h %b",
               vtx_index, desc.stride, desc.offset, desc.base, attr.addr, attr.oob,
               exp_addr, exp_oob);
    end
    if (exp_oob) n_oob++; else n_in++;
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      vtx_valid   = 1'($urandom);
      vtx_index   = (i % 2 == 1) ? IDX_W'($urandom) : IDX_W'($urandom_range(0, 400));
      desc.base   = ADDR_W'($urandom);
      desc.stride = STRIDE_W'($urandom_range(1, 64));
      desc.offset = AOFF_W'($urandom_range(0, 48));
      desc.size   = SIZE_W'($urandom_range(1, 16));
      desc.limit  = (ADDR_W+1)'($urandom_range(0, 65536));
      check();
    end
    // exactly at the limit: last byte inside, then one byte past
    desc = '{base: 16'h1000, stride: 8'd16, offset: 8'd4, size: 5'd8, limit: 17'd100};
    vtx_valid = 1'b1;
    vtx_index = 16'd5;  check();   // rel 84, end 92: inside
    vtx_index = 16'd6;  check();   // rel 100, end 108: outside
    desc.limit = 17'd108; check(); // end exactly at the limit: inside
    checks++;
    if (n_oob == 0 || n_in == 0) begin
      failures++; $display("FAIL both statuses not seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
