// hfi_campaign_tb: component- and register-level vulnerability campaigns.
//
// Runs the analysis flow of the framework on the emulation set-up (160 x 120
// frames, full 1813-register map):
//   1. component level: every one of the 13 components in component mode, with
//      both schemes, at the low, medium and high fault rates (0.0144 %, 0.1298 %,
//      2.10 % per cycle, thresholds 151, 1361 and 22020), one frame each;
//   2. register level: every register of the OA unit in register mode,
//      bit-weighted, at the high rate.
// The testbench stands in for the two DE kernel instances (a fault in DE
// component c corrupts the next 1 + c % 4 faulty pixels) and prints the affected
// pixels and wrong decisions per target, the raw data of a criticality chart.
// Checked: every fault stays inside the target; per rate, the number of faults
// over all runs is within 6 sigma of rate x cycles; affected pixels per frame
// match the testbench's own count; the monitor's totals match.
module hfi_campaign_tb;
  import hfi_pkg::*;
  localparam int IMG_W = 160, IMG_H = 120, DISP_W = 6;
  localparam int NPIX = IMG_W * IMG_H, STRIP = IMG_W / 8;
  localparam int DE_NC = 12, DE_NR = 1805, NC = 13, NR = 1813;
  localparam int BLANK = 16;
  localparam int RATES [3] = '{151, 1361, 22020};

  logic clk = 0, rst_n = 0;
  logic fi_en, tgt_load, tgt_step, tgt_ready, tgt_wrapped, inj_valid;
  fi_mode_e mode;
  fi_scheme_e scheme;
  logic [19:0] rate;
  logic [15:0] period;
  logic [3:0] load_c, tgt_c, inj_c;
  logic [10:0] load_r, tgt_r, inj_r;
  logic [15:0] load_b, tgt_b, inj_b, inject_bit;
  logic [NC-1:0] skip_c;
  logic [NR-1:0] skip_r;
  logic [31:0] fi_count;
  logic [DE_NC-1:0] de_inject_c;
  logic [DE_NR-1:0] de_inject_r;
  logic gold_valid, test_valid, frame_end;
  logic [DISP_W-1:0] gold_disp, test_disp;
  logic gold_dir_valid, test_dir_valid, frame_done;
  logic [2:0] gold_dir, test_dir;
  logic [31:0] frame_err, frame_pix, total_err, frames, err_frames, decisions, wrong_decisions;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hfi_top #(.IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  int corrupt_left = 0, n_faults = 0, n_out = 0, tb_err = 0, tb_wrong = 0, nframes = 0;

  always @(negedge clk) if (rst_n && inj_valid) begin
    n_faults++;
    if (inj_c != tgt_c) n_out++;
    if (mode == MODE_REGISTER && inj_r != 11'(DE_NR) + tgt_r) n_out++;
    if (int'(inj_c) < DE_NC) corrupt_left += 1 + int'(inj_c) % 4;
  end

  task automatic run_frame(input int fav, output int ferr, output bit wrong);
    int x, d;
    logic [DISP_W-1:0] t;
    ferr = 0;
    for (int p = 0; p < NPIX; p++) begin
      @(negedge clk);
      fi_en = 1;
      x = p % IMG_W;
      d = (x / STRIP == fav) ? $urandom_range(0, 12) : $urandom_range(8, 63);
      t = DISP_W'(d);
      if (corrupt_left > 0) begin t[0] = ~t[0]; corrupt_left--; ferr++; end
      gold_valid = 1; test_valid = 1; gold_disp = DISP_W'(d); test_disp = t;
      frame_end = (p == NPIX - 1);
    end
    @(negedge clk);
    fi_en = 0;
    gold_valid = 0; test_valid = 0; frame_end = 0;
    while (!gold_dir_valid) @(negedge clk);
    check(frame_err == 32'(ferr), $sformatf("affected pixels %0d expected %0d", frame_err, ferr));
    wrong = (gold_dir != test_dir);
    tb_err += ferr; tb_wrong += wrong; nframes++;
    repeat (BLANK) @(negedge clk);
    corrupt_left = 0;
  endtask

  task automatic rate_check(input int r, input int n_before, input int runs);
    real p, mean, sd;
    int got;
    got = n_faults - n_before;
    p = real'(r) / 1048575.0;
    mean = real'(runs) * NPIX * p;
    sd = $sqrt(mean * (1.0 - p));
    check(got > mean - 6 * sd - 2 && got < mean + 6 * sd + 2,
          $sformatf("rate %0d: %0d faults, expected %0.1f", r, got, mean));
  endtask

  initial begin
    int ferr, n_before;
    bit wrong;
    fi_en = 0; mode = MODE_COMPONENT; scheme = SCHEME_COMPONENT; rate = 0; period = 1;
    tgt_load = 0; tgt_step = 0; load_c = 0; load_r = 0; load_b = 0; skip_c = '0; skip_r = '0;
    gold_valid = 0; test_valid = 0; frame_end = 0; gold_disp = 0; test_disp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // component level
    for (int ri = 0; ri < 3; ri++) begin
      n_before = n_faults;
      for (int s = 0; s < 2; s++) begin
        @(negedge clk);
        mode = MODE_COMPONENT; scheme = fi_scheme_e'(s); rate = 20'(RATES[ri]);
        tgt_load = 1; load_c = 0; load_r = 0; load_b = 0;
        @(negedge clk); tgt_load = 0;
        for (int c = 0; c < NC; c++) begin
          run_frame(c % 8, ferr, wrong);
          $display("component-level %s rate %0d: component %0d affected pixels %0d wrong decision %0d",
                   s ? "bit-weighted" : "component-weighted", RATES[ri], c, ferr, wrong);
          @(negedge clk); tgt_step = 1;
          @(negedge clk); tgt_step = 0;
        end
        check(tgt_c == 4'd0, "component sweep wrapped to component 0");
      end
      rate_check(RATES[ri], n_before, 2 * NC);
    end
    // register level on the OA unit
    @(negedge clk);
    mode = MODE_REGISTER; scheme = SCHEME_BIT; rate = 20'(RATES[2]);
    tgt_load = 1; load_c = 4'(DE_NC); load_r = 0; load_b = 0;
    @(negedge clk); tgt_load = 0;
    for (int r = 0; r < 8; r++) begin
      run_frame(5, ferr, wrong);
      $display("register-level bit-weighted rate %0d: OA register %0d wrong decision %0d", RATES[2], r, wrong);
      @(negedge clk); tgt_step = 1;
      @(negedge clk); tgt_step = 0;
    end
    check(n_out == 0, "faults stay inside the target");
    check(total_err == 32'(tb_err) && wrong_decisions == 32'(tb_wrong) && frames == 32'(nframes), "monitor totals");
    check(tb_wrong > 0 && tb_err > 0, "campaign produced output errors");
    $display("frames %0d faults %0d affected pixels %0d wrong decisions %0d", nframes, n_faults, tb_err, tb_wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
