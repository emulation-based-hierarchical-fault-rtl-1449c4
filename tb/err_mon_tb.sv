// err_mon_tb: affected-pixel and wrong-decision counting.
// Random frames of random length; the faulty stream differs from the golden one
// on randomly chosen pixels, and decisions differ on chosen frames. The
// testbench counts the differences itself and compares with the monitor.
module err_mon_tb;
  logic clk = 0, rst_n = 0;
  logic gold_valid, test_valid, frame_end, gold_dir_valid, test_dir_valid, frame_done;
  logic [5:0] gold_disp, test_disp;
  logic [2:0] gold_dir, test_dir;
  logic [31:0] frame_err, frame_pix, total_err, frames, err_frames, decisions, wrong_decisions;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  err_mon #(.DISP_W(6), .DIR_W(3)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    int n, e, tot = 0, ef = 0, wd = 0;
    gold_valid = 0; test_valid = 0; frame_end = 0; gold_dir_valid = 0; test_dir_valid = 0;
    gold_disp = 0; test_disp = 0; gold_dir = 0; test_dir = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      n = $urandom_range(5, 300);
      e = 0;
      for (int i = 0; i < n; i++) begin
        // idle cycle now and then
        if ($urandom_range(0, 7) == 0) begin
          @(negedge clk);
          gold_valid = 0; test_valid = 0; frame_end = 0;
        end
        @(negedge clk);
        gold_valid = 1; test_valid = 1;
        gold_disp = 6'($urandom);
        test_disp = gold_disp;
        if (f % 4 != 0 && $urandom_range(0, 9) == 0) begin test_disp = gold_disp ^ 6'(1 << $urandom_range(0, 5)); e++; end
        frame_end = (i == n - 1);
      end
      @(negedge clk);
      gold_valid = 0; test_valid = 0; frame_end = 0;
      check(frame_done && frame_err == 32'(e) && frame_pix == 32'(n), $sformatf("frame %0d: %0d/%0d expected %0d/%0d", f, frame_err, frame_pix, e, n));
      tot += e; if (e != 0) ef++;
      // decisions
      gold_dir_valid = 1; test_dir_valid = 1; gold_dir = 3'($urandom);
      test_dir = (f % 3 == 0) ? gold_dir + 3'd1 : gold_dir;
      if (f % 3 == 0) wd++;
      @(negedge clk);
      gold_dir_valid = 0; test_dir_valid = 0;
      @(negedge clk);
    end
    check(total_err == 32'(tot), "total errors");
    check(frames == 20 && err_frames == 32'(ef), "frame counts");
    check(decisions == 20 && wrong_decisions == 32'(wd), "decision counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
