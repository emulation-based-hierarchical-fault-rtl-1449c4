// hfi_top_full_tb: end-to-end test of the framework at its default size
// (640 x 480 frames, 13 components, 1813 registers, 130,136 flip-flops).
//
// The testbench plays the two disparity-estimation instances: it generates a
// disparity map for every frame (one strip of the eight darker than the rest, so
// the obstacle-avoidance decision is known) and sends it to the fault-free side
// unchanged. The faulty side receives the same map, except that each fault the
// mechanism injects into DE component c corrupts the next 1 + c % 4 pixels (bit 0
// inverted), a stand-in for the propagation of an upset through the kernel.
// The testbench models the obstacle-avoidance accumulators of both sides,
// including the bits flipped into the faulty one, and checks:
//   - the fault-free and faulty decisions against the model,
//   - affected pixels per frame and wrong decisions against its own counts,
//   - every injected location against the mode and target of the campaign,
//   - that each mechanism happened: faults in DE and OA components, all four
//     modes, both schemes, a target step over skipped components, affected
//     pixels and a wrong decision.
module hfi_top_full_tb;
  import hfi_pkg::*;
  localparam int IMG_W = 640, IMG_H = 480, DISP_W = 6;
  localparam int NPIX = IMG_W * IMG_H, STRIP = IMG_W / 8;
  localparam int DE_NC = 12, DE_NR = 1805, NC = 13, NR = 1813;
  localparam int ACC_W = $clog2(STRIP * IMG_H * 63 + 1);
  localparam int BLANK = 16;

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

  hfi_top dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_de = 0, n_oa = 0, n_mode [4] = '{0, 0, 0, 0}, n_scheme [2] = '{0, 0};
  int n_skip_step = 0, n_wrong = 0, n_err_pix = 0, n_out_of_target = 0;

  // ------------------------------------------------------------ DE stand-in and OA model
  int corrupt_left = 0;
  int exp_err = 0;
  longint gold_acc [8], test_acc [8];
  bit oa_hit_late = 0;      // OA fault during the decision scan: decision not modelled
  bit in_scan = 0;
  bit campaign_en = 0;

  // book-keeping of injected faults, sampled where the strobes are valid
  always @(negedge clk) if (rst_n && inj_valid) begin
    n_mode[mode]++;
    n_scheme[scheme]++;
    if (int'(inj_c) < DE_NC) begin
      n_de++;
      corrupt_left += 1 + int'(inj_c) % 4;
    end else n_oa++;
    unique case (mode)
      MODE_COMPONENT: if (inj_c != tgt_c) n_out_of_target++;
      MODE_REGISTER:  if (inj_c != tgt_c) n_out_of_target++;
      MODE_BIT:       if (inj_c != tgt_c || inj_b != tgt_b) n_out_of_target++;
      default: ;
    endcase
  end

  function automatic int argmin(input longint a [8]);
    int b = 0;
    for (int s = 1; s < 8; s++) if (a[s] < a[b]) b = s;
    return b;
  endfunction

  // drive one frame; fav is the strip with the smallest disparities
  task automatic frame(input int fav, output int gdir, output int tdir, output int ferr);
    int x, d;
    logic [DISP_W-1:0] t;
    foreach (gold_acc[s]) begin gold_acc[s] = 0; test_acc[s] = 0; end
    ferr = 0;
    for (int p = 0; p < NPIX; p++) begin
      @(negedge clk);
      fi_en = campaign_en;
      x = p % IMG_W;
      d = (x / STRIP == fav) ? $urandom_range(0, 12) : $urandom_range(8, 63);
      t = DISP_W'(d);
      if (corrupt_left > 0) begin t[0] = ~t[0]; corrupt_left--; ferr++; end
      gold_valid = 1; test_valid = 1; gold_disp = DISP_W'(d); test_disp = t;
      frame_end = (p == NPIX - 1);
      // state after the coming edge: add the pixel, then any bit flipped by the
      // OA strobes that are valid now
      gold_acc[x / STRIP] += d;
      test_acc[x / STRIP] = (test_acc[x / STRIP] + t) % (64'd1 << ACC_W);
      if (inj_valid && int'(inj_c) == DE_NC)
        test_acc[int'(inj_r) - DE_NR] ^= (64'd1 << inj_b);
    end
    @(negedge clk);
    fi_en = 0;
    gold_valid = 0; test_valid = 0; frame_end = 0;
    gdir = argmin(gold_acc);
    tdir = argmin(test_acc);
    in_scan = 1;
  endtask

  // faults that land in the OA accumulators during the scan are not modelled
  always @(negedge clk) if (in_scan && inj_valid && int'(inj_c) == DE_NC) oa_hit_late = 1;

  task automatic run_frame(input int fav);
    int gdir, tdir, ferr, waited;
    oa_hit_late = 0;
    frame(fav, gdir, tdir, ferr);
    waited = 0;
    while (!gold_dir_valid && waited < 40) begin @(negedge clk); waited++; end
    check(frame_err == 32'(ferr), $sformatf("affected pixels %0d expected %0d", frame_err, ferr));
    check(frame_pix == 32'(NPIX), "pixels per frame");
    check(gold_dir_valid && int'(gold_dir) == gdir, $sformatf("fault-free decision %0d expected %0d", gold_dir, gdir));
    if (!oa_hit_late)
      check(test_dir_valid && int'(test_dir) == tdir, $sformatf("faulty decision %0d expected %0d", test_dir, tdir));
    if (gold_dir != test_dir) n_wrong++;
    n_err_pix += ferr;
    in_scan = 0;
    repeat (BLANK) @(negedge clk);
  endtask

  task automatic configure(input fi_mode_e m, input fi_scheme_e s, input int r, input int per);
    @(negedge clk);
    mode = m; scheme = s; rate = 20'(r); period = 16'(per);
  endtask

  task automatic load_target(input int c, input int r, input int b);
    @(negedge clk); tgt_load = 1; load_c = 4'(c); load_r = 11'(r); load_b = 16'(b);
    @(negedge clk); tgt_load = 0;
  endtask

  initial begin
    int f;
    fi_en = 0; mode = MODE_SYSTEM; scheme = SCHEME_COMPONENT; rate = 0; period = 1;
    tgt_load = 0; tgt_step = 0; load_c = 0; load_r = 0; load_b = 0; skip_c = '0; skip_r = '0;
    gold_valid = 0; test_valid = 0; frame_end = 0; gold_disp = 0; test_disp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    f = 0;
    // 1: whole system, component-weighted, 0.0144 % per cycle
    campaign_en = 1;
    configure(MODE_SYSTEM, SCHEME_COMPONENT, 151, 1);
    run_frame(2); f++;
    // 2: whole system, bit-weighted
    configure(MODE_SYSTEM, SCHEME_BIT, 151, 1);
    run_frame(5); f++;
    // 3: component mode on the OA unit (component 12), bit-weighted
    load_target(12, 0, 0);
    configure(MODE_COMPONENT, SCHEME_BIT, 151, 1);
    run_frame(1); f++;
    // 4: register mode on register 7 of DE component 5, component-weighted
    load_target(5, 7, 0);
    configure(MODE_REGISTER, SCHEME_COMPONENT, 151, 1);
    run_frame(6); f++;
    // 5: bit mode, one fault per frame into the top bit of the darkest strip's
    //    accumulator: the faulty side must turn away from the free direction
    load_target(12, 3, ACC_W - 1);
    configure(MODE_BIT, SCHEME_BIT, 20'hFFFFF, 16'hFFFF);
    run_frame(3); f++;
    // 6: component mode stepping over components marked resilient
    campaign_en = 0;
    configure(MODE_COMPONENT, SCHEME_COMPONENT, 0, 1);
    skip_c = 13'b0_0000_0001_1110;
    load_target(0, 0, 0);
    @(negedge clk); tgt_step = 1;
    @(negedge clk); tgt_step = 0;
    while (!tgt_ready) @(negedge clk);
    check(tgt_c == 4'd5, $sformatf("step over skipped components: at %0d", tgt_c));
    if (tgt_c == 4'd5) n_skip_step++;
    run_frame(0); f++;
    // mechanisms
    check(n_de > 0, "faults in DE components");
    check(n_oa > 0, "faults in the OA component");
    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, $sformatf("mode %0d used", m));
    check(n_scheme[0] > 0 && n_scheme[1] > 0, "both schemes used");
    check(n_out_of_target == 0, "faults stay in the target");
    check(n_skip_step > 0, "target step over skipped components");
    check(n_err_pix > 0 && total_err == 32'(n_err_pix), "affected pixels");
    check(n_wrong > 0 && wrong_decisions == 32'(n_wrong), "wrong decisions");
    check(frames == 32'(f) && decisions == 32'(f), "frames and decisions");
    check(fi_count >= 32'(n_de + n_oa), "fault_inject count");
    $display("faults: DE %0d OA %0d; modes %0d/%0d/%0d/%0d; schemes %0d/%0d; affected pixels %0d; wrong decisions %0d",
             n_de, n_oa, n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_scheme[0], n_scheme[1], n_err_pix, n_wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
