// err_mon: output comparison between the faulty and the fault-free instance.
//
// Two copies of the circuit under analysis run side by side on the same input;
// only one receives faults. This monitor compares their outputs: every valid
// disparity pair that differs is an affected pixel, counted per frame (computing
// window) and in total; every frame whose obstacle-avoidance decisions differ is
// a wrong decision. The share of affected pixels is frame_err / frame_pix.
//
// Interface: gold_* and test_* pixel streams (valid in the same cycle, since the
// two instances run in lockstep) with frame_end marking the last pixel; decision
// strobes gold_dir_valid/test_dir_valid with gold_dir/test_dir. Per frame,
// frame_done pulses one cycle after the last pixel with frame_err and frame_pix
// of that frame. Counters are 32 bits and wrap. Comparing the two outputs comes
// from the evaluation set-up; the counters are this design's choice.
module err_mon #(
  parameter int unsigned DISP_W = 6,
  parameter int unsigned DIR_W  = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              gold_valid,
  input  logic [DISP_W-1:0] gold_disp,
  input  logic              test_valid,
  input  logic [DISP_W-1:0] test_disp,
  input  logic              frame_end,
  input  logic              gold_dir_valid,
  input  logic [DIR_W-1:0]  gold_dir,
  input  logic              test_dir_valid,
  input  logic [DIR_W-1:0]  test_dir,
  output logic              frame_done,
  output logic [31:0]       frame_err,
  output logic [31:0]       frame_pix,
  output logic [31:0]       total_err,
  output logic [31:0]       frames,
  output logic [31:0]       err_frames,
  output logic [31:0]       decisions,
  output logic [31:0]       wrong_decisions
);
  logic [31:0] cur_err, cur_pix;
  logic        diff;

  assign diff = gold_valid && (!test_valid || gold_disp != test_disp);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_err <= '0; cur_pix <= '0;
      frame_done <= 1'b0; frame_err <= '0; frame_pix <= '0;
      total_err <= '0; frames <= '0; err_frames <= '0;
      decisions <= '0; wrong_decisions <= '0;
    end else begin
      frame_done <= 1'b0;
      if (gold_valid) begin
        if (frame_end) begin
          cur_err    <= '0;
          cur_pix    <= '0;
          frame_done <= 1'b1;
          frame_err  <= cur_err + 32'(diff);
          frame_pix  <= cur_pix + 32'd1;
          frames     <= frames + 32'd1;
          if (cur_err + 32'(diff) != '0) err_frames <= err_frames + 32'd1;
        end else begin
          cur_err <= cur_err + 32'(diff);
          cur_pix <= cur_pix + 32'd1;
        end
        total_err <= total_err + 32'(diff);
      end
      if (gold_dir_valid) begin
        decisions <= decisions + 32'd1;
        if (!test_dir_valid || gold_dir != test_dir) wrong_decisions <= wrong_decisions + 32'd1;
      end
    end
  end

  always_ff @(posedge clk)
    if (rst_n) assert (gold_valid == test_valid) else $error("err_mon: streams out of lockstep");
endmodule
