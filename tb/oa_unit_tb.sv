// oa_unit_tb: obstacle-avoidance decision on random small frames.
// Frame 16 x 4 with 8 strips of 2 columns. For each frame the expected strip sums
// and the direction (smallest sum, lowest index on ties) are computed in the
// testbench. Checked: accumulator contents at frame end, the direction, its
// latency (high NREG+1 cycles after the cycle of the last pixel), and that a bit flipped into an
// accumulator by the injection strobes changes the sum by exactly that bit and
// can change the decision.
module oa_unit_tb;
  localparam int IMG_W = 16, IMG_H = 4, DISP_W = 6, NREG = 8, STRIP = IMG_W / NREG;
  localparam int ACC_W = $clog2(STRIP * IMG_H * 63 + 1);

  logic clk = 0, rst_n = 0;
  logic pix_valid, inj_c, dir_valid;
  logic [DISP_W-1:0] pix_disp;
  logic [NREG-1:0] inj_r;
  logic [15:0] inj_bit;
  logic [2:0] dir;
  logic [NREG-1:0][ACC_W-1:0] acc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  oa_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DISP_W(DISP_W), .NREG(NREG)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  int sums [NREG];
  int changed = 0;

  task automatic run_frame(input bit inject, input int f);
    int best, lat;
    foreach (sums[i]) sums[i] = 0;
    for (int y = 0; y < IMG_H; y++) begin
      if (inject && y == IMG_H - 1) begin
        // idle cycle carrying a fault: top bit of the favoured strip's accumulator
        @(negedge clk);
        pix_valid = 0;
        inj_c = 1; inj_r = NREG'(1) << (f % NREG); inj_bit = 16'(ACC_W - 1);
        sums[f % NREG] ^= (1 << (ACC_W - 1));
        @(negedge clk);
        inj_c = 0; inj_r = '0;
        check(int'(acc[f % NREG]) == sums[f % NREG], "injected flip");
      end
      for (int x = 0; x < IMG_W; x++) begin
        @(negedge clk);
        pix_valid = 1;
        // frame f favours strip f % 8 with small values
        pix_disp = DISP_W'((x / STRIP == f % NREG) ? $urandom_range(0, 20) : $urandom_range(10, 63));
        sums[x / STRIP] = (sums[x / STRIP] + pix_disp) % (1 << ACC_W);
      end
    end
    @(negedge clk);
    pix_valid = 0;
    lat = 1;
    for (int s = 0; s < NREG; s++) check(int'(acc[s]) == sums[s], $sformatf("strip %0d sum", s));
    while (!dir_valid && lat < 50) begin @(negedge clk); lat++; end
    best = 0;
    for (int s = 1; s < NREG; s++) if (sums[s] < sums[best]) best = s;
    check(dir_valid && int'(dir) == best, $sformatf("direction %0d expected %0d", dir, best));
    check(lat == NREG + 1, $sformatf("decision latency %0d", lat));
    if (inject && best != f % NREG) changed++;
    repeat (3) @(negedge clk);
    for (int s = 0; s < NREG; s++) check(acc[s] == '0, "cleared");
  endtask

  initial begin
    pix_valid = 0; pix_disp = 0; inj_c = 0; inj_r = '0; inj_bit = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 12; f++) run_frame(f % 3 == 2, f);
    check(changed > 0, "an injected fault changed a decision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
