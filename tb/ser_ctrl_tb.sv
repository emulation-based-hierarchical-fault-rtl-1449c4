// ser_ctrl_tb: fault_inject pulse rate and slot timing.
//  1. rate threshold at the 2.10 % end of the evaluated range, every cycle:
//     the pulse count over 200,000 cycles must be within 6 sigma of 2.10 %.
//  2. threshold all ones with period 5: a pulse exactly every 5th cycle.
//  3. rate 0 or en low: no pulse. fi_count must equal the pulses seen.
module ser_ctrl_tb;
  localparam int RATE_W = 20;
  logic clk = 0, rst_n = 0;
  logic en;
  logic [RATE_W-1:0] rate;
  logic [15:0] period;
  logic fi;
  logic [31:0] fi_count;
  int checks = 0, failures = 0;
  int seen;
  always #5 clk = ~clk;

  ser_ctrl #(.RATE_W(RATE_W)) dut (.clk, .rst_n, .en, .rate, .period, .fi, .fi_count);

  always @(posedge clk) if (rst_n && fi) seen++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    real p, mean, sd;
    int last, gap_bad;
    en = 0; rate = 0; period = 1; seen = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. statistical rate
    @(negedge clk);
    rate = 20'd22020; en = 1;
    repeat (200000) @(negedge clk);
    en = 0;
    @(negedge clk);
    p = 22020.0 / ((1 << RATE_W) - 1);
    mean = 200000.0 * p;
    sd = $sqrt(mean * (1.0 - p));
    $display("pulses %0d expected %0.1f", seen, mean);
    check(seen > mean - 6 * sd && seen < mean + 6 * sd, "rate 2.10%");
    check(fi_count == 32'(seen), "fi_count");
    // 2. slot period 5, threshold saturated
    seen = 0;
    rate = '1; period = 5; en = 1;
    last = -1; gap_bad = 0;
    for (int t = 0; t < 100; t++) begin
      @(posedge clk); #1;
      if (fi) begin
        if (last >= 0 && t - last != 5) gap_bad++;
        last = t;
      end
    end
    check(gap_bad == 0, "period 5 spacing");
    check(seen >= 19 && seen <= 21, "period 5 count");
    // 3. off cases
    seen = 0;
    rate = 0; period = 1;
    repeat (1000) @(negedge clk);
    check(seen == 0, "rate 0");
    rate = '1; en = 0;
    repeat (1000) @(negedge clk);
    check(seen == 0, "en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
