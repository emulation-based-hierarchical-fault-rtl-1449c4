// target_ctr_tb: stepping order, carries, wrap and skip masks on a small map.
// Map: 4 components with 2, 5, 1 and 2 registers (same map as the selector tests).
// The expected sequences are listed by hand from the map.
module target_ctr_tb;
  import hfi_pkg::*;
  localparam int NC = 4, NR = 10;
  localparam logic [NR-1:0][15:0] REG_W = {16'd6, 16'd6, 16'd16, 16'd1, 16'd7, 16'd4, 16'd2, 16'd8, 16'd5, 16'd3};
  localparam logic [NR-1:0][15:0] REG_C = {16'd3, 16'd3, 16'd2, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd0, 16'd0};

  logic clk = 0, rst_n = 0;
  fi_mode_e mode;
  logic load, step, ready, wrapped;
  logic [1:0] load_c, tgt_c;
  logic [3:0] load_r, tgt_r;
  logic [15:0] load_b, tgt_b;
  logic [NC-1:0] skip_c;
  logic [NR-1:0] skip_r;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  target_ctr #(.NC(NC), .NR(NR), .REG_W(REG_W), .REG_C(REG_C)) dut (.*);

  task automatic expect_tgt(input int c, input int r, input int b, input string msg);
    checks++;
    if (tgt_c != 2'(c) || tgt_r != 4'(r) || tgt_b != 16'(b)) begin
      failures++;
      $display("FAIL %s: got %0d/%0d/%0d expected %0d/%0d/%0d", msg, tgt_c, tgt_r, tgt_b, c, r, b);
    end
  endtask

  task automatic do_step();
    @(negedge clk); step = 1;
    @(negedge clk); step = 0;
    while (!ready) @(negedge clk);
  endtask

  initial begin
    bit saw_wrap;
    mode = MODE_COMPONENT; load = 0; step = 0; load_c = 0; load_r = 0; load_b = 0;
    skip_c = '0; skip_r = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_tgt(0, 0, 0, "reset");
    // component mode: 0 1 2 3 0 with a wrap
    for (int c = 1; c <= 4; c++) begin
      do_step();
      expect_tgt(c % 4, 0, 0, "component step");
    end
    // register mode through the whole map: 10 registers
    mode = MODE_REGISTER;
    begin
      int seq_c [10] = '{0, 0, 1, 1, 1, 1, 1, 2, 3, 3};
      int seq_r [10] = '{0, 1, 0, 1, 2, 3, 4, 0, 0, 1};
      for (int k = 1; k <= 10; k++) begin
        saw_wrap = 0;
        @(negedge clk); step = 1;
        @(negedge clk); step = 0; saw_wrap = wrapped;
        expect_tgt(seq_c[k % 10], seq_r[k % 10], 0, "register step");
        checks++;
        if (saw_wrap != (k == 10)) begin failures++; $display("FAIL wrap flag at %0d", k); end
      end
    end
    // bit mode: carry from bit to register to component
    mode = MODE_BIT;
    @(negedge clk); load = 1; load_c = 0; load_r = 1; load_b = 4;   // register 1, 5 bits
    @(negedge clk); load = 0;
    do_step(); expect_tgt(1, 0, 0, "bit carry into next component");
    @(negedge clk); load = 1; load_c = 1; load_r = 4; load_b = 0;   // register 6, 1 bit
    @(negedge clk); load = 0;
    do_step(); expect_tgt(2, 0, 0, "one-bit register carry");
    do_step(); expect_tgt(2, 0, 1, "bit step");
    // skip masks: component 1 resilient, register 8 resilient
    mode = MODE_REGISTER; skip_c = 4'b0010; skip_r = 10'b01_0000_0000;
    @(negedge clk); load = 1; load_c = 0; load_r = 1; load_b = 0;
    @(negedge clk); load = 0;
    do_step(); expect_tgt(2, 0, 0, "skip component 1");
    do_step(); expect_tgt(3, 1, 0, "skip register 8");
    mode = MODE_COMPONENT;
    do_step(); expect_tgt(0, 0, 0, "component wrap");
    do_step(); expect_tgt(2, 0, 0, "component skip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
