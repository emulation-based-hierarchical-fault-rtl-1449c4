// cw_sel_tb: distribution of the component-weighted selection on a small map.
// Map: 4 components with 2, 5, 1 and 2 registers of uneven widths.
// System mode: every component about 1/4 of the samples, every register about
// 1/4 * 1/NR(c), bit always inside its register. Component, register and bit
// modes: selections stay inside the target, uniformly; bit mode is exact.
module cw_sel_tb;
  import hfi_pkg::*;
  localparam int NC = 4, NR = 10;
  localparam logic [NR-1:0][15:0] REG_W = {16'd6, 16'd6, 16'd16, 16'd1, 16'd7, 16'd4, 16'd2, 16'd8, 16'd5, 16'd3};
  localparam logic [NR-1:0][15:0] REG_C = {16'd3, 16'd3, 16'd2, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd0, 16'd0};
  localparam int NREG [NC] = '{2, 5, 1, 2};
  localparam int FIRST [NC] = '{0, 2, 7, 8};
  localparam int N = 40000;

  logic clk = 0, rst_n = 0;
  fi_mode_e mode;
  logic [1:0] tgt_c, sel_c;
  logic [3:0] tgt_r, sel_r;
  logic [15:0] tgt_b, sel_b;
  int checks = 0, failures = 0;
  int cnt_c [NC];
  int cnt_r [NR];
  int cnt_b [16];
  always #5 clk = ~clk;

  cw_sel #(.NC(NC), .NR(NR), .REG_W(REG_W), .REG_C(REG_C)) dut (
    .clk, .rst_n, .mode, .tgt_c, .tgt_r, .tgt_b, .sel_c, .sel_r, .sel_b);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // relative deviation allowed from an expected count
  function automatic bit near(int got, real expd);
    return (got > expd * 0.85) && (got < expd * 1.15);
  endfunction

  task automatic sample(input int n, output int bad);
    bad = 0;
    foreach (cnt_c[i]) cnt_c[i] = 0;
    foreach (cnt_r[i]) cnt_r[i] = 0;
    foreach (cnt_b[i]) cnt_b[i] = 0;
    repeat (n) begin
      @(negedge clk);
      cnt_c[sel_c]++;
      cnt_r[sel_r]++;
      cnt_b[sel_b]++;
      if (REG_C[sel_r] != 16'(sel_c)) bad++;
      if (sel_b >= REG_W[sel_r]) bad++;
    end
  endtask

  initial begin
    int bad;
    mode = MODE_SYSTEM; tgt_c = 0; tgt_r = 0; tgt_b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // system mode
    sample(N, bad);
    check(bad == 0, "system: location outside map");
    for (int c = 0; c < NC; c++) begin
      check(near(cnt_c[c], N / 4.0), $sformatf("system: component %0d count %0d", c, cnt_c[c]));
      for (int r = FIRST[c]; r < FIRST[c] + NREG[c]; r++)
        check(near(cnt_r[r], N / 4.0 / NREG[c]), $sformatf("system: register %0d count %0d", r, cnt_r[r]));
    end
    // component mode, component 1
    mode = MODE_COMPONENT; tgt_c = 1;
    sample(N, bad);
    check(bad == 0 && cnt_c[1] == N, "component: stays in component 1");
    for (int r = 2; r < 7; r++)
      check(near(cnt_r[r], N / 5.0), $sformatf("component: register %0d count %0d", r, cnt_r[r]));
    // register mode, component 1 register 3 (global 5, 7 bits)
    mode = MODE_REGISTER; tgt_r = 3;
    sample(N, bad);
    check(bad == 0 && cnt_r[5] == N, "register: stays in register 5");
    for (int b = 0; b < 7; b++)
      check(near(cnt_b[b], N / 7.0), $sformatf("register: bit %0d count %0d", b, cnt_b[b]));
    // bit mode
    mode = MODE_BIT; tgt_c = 2; tgt_r = 0; tgt_b = 11;
    sample(100, bad);
    check(bad == 0 && cnt_r[7] == 100 && cnt_b[11] == 100, "bit: exact location");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
