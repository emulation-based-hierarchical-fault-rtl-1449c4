// lfsr_tb: checks that the LFSR is maximal length at several widths.
// For each width the state is followed from reset until it returns to the seed:
// the period must be exactly 2^W-1 and the state must never be zero.
module lfsr_tb;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int NW = 6;
  localparam int WS [NW] = '{3, 4, 7, 8, 12, 16};

  logic [NW-1:0] done;

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int W = WS[g];
    logic [W-1:0] q, seed;
    int period;
    lfsr #(.W(W), .SEED(W'(5))) dut (.clk, .rst_n, .en(1'b1), .q);
    initial begin
      done[g] = 0;
      period = 0;
      @(posedge rst_n);
      @(negedge clk);
      seed = q;
      do begin
        @(negedge clk);
        period++;
        if (q == '0) begin failures++; $display("W=%0d zero state", W); end
      end while (q != seed && period < (1 << W) + 2);
      checks++;
      if (period != (1 << W) - 1) begin
        failures++;
        $display("W=%0d period %0d expected %0d", W, period, (1 << W) - 1);
      end
      done[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
