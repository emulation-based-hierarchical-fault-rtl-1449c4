// oa_unit: obstacle-avoidance decision unit.
//
// Chooses the direction of movement from a disparity map. The image is split
// into NREG vertical strips, one per candidate direction. While the map streams in
// (one disparity per valid cycle, raster order, IMG_W x IMG_H per frame), each
// strip's disparities are summed in its own accumulator register by its own adder.
// After the last pixel of a frame a single comparator scans the accumulators, one
// per cycle, and keeps the smallest sum: the strip whose content is farthest away
// (disparity falls with distance) is the free direction. dir_valid pulses with the
// chosen strip index in dir, then the accumulators are cleared for the next frame.
//
// The accumulators are fault-injectable (fi_reg); inj_c/inj_r/inj_bit are this
// component's injectC, injectR and bit strobes from the fault injection mechanism.
//
// Timing: dir_valid is high NREG+1 cycles after the cycle of the last pixel. The
// unit needs NREG+1 idle cycles between frames (video blanking); a pixel arriving
// during the scan or the clear is flagged by an assertion.
// Eight registers, eight adders and one comparator come from the evaluated system;
// the strip split, minimum-sum rule, frame size and disparity width are this
// design's choices.
module oa_unit #(
  parameter int unsigned IMG_W  = 640,
  parameter int unsigned IMG_H  = 480,
  parameter int unsigned DISP_W = 6,
  parameter int unsigned NREG   = 8,
  localparam int unsigned STRIP = IMG_W / NREG,
  localparam int unsigned ACC_W = $clog2(STRIP * IMG_H * ((1 << DISP_W) - 1) + 1),
  localparam int unsigned DIR_W = (NREG > 1) ? $clog2(NREG) : 1,
  localparam int unsigned BW    = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pix_valid,
  input  logic [DISP_W-1:0]    pix_disp,
  input  logic                 inj_c,
  input  logic [NREG-1:0]      inj_r,
  input  logic [BW-1:0]        inj_bit,
  output logic [DIR_W-1:0]     dir,
  output logic                 dir_valid,
  output logic [NREG-1:0][ACC_W-1:0] acc
);
  typedef enum logic [1:0] {S_ACCUM, S_SCAN, S_CLEAR} state_e;

  state_e                       state;
  logic [$clog2(STRIP+1)-1:0]   col;
  logic [DIR_W-1:0]             strip;
  logic [$clog2(IMG_H+1)-1:0]   row;
  logic [DIR_W-1:0]             scan_i;
  logic [ACC_W-1:0]             best_val;
  logic [DIR_W-1:0]             best_idx;
  logic                         last_pix;

  assign last_pix = pix_valid && (32'(col) == STRIP - 1) && (32'(strip) == NREG - 1) &&
                    (32'(row) == IMG_H - 1);

  for (genvar g = 0; g < NREG; g++) begin : g_acc
    logic en;
    logic [ACC_W-1:0] d;
    always_comb begin
      en = (state == S_CLEAR) || (state == S_ACCUM && pix_valid && 32'(strip) == g);
      d  = (state == S_CLEAR) ? '0 : acc[g] + ACC_W'(pix_disp);
    end
    fi_reg #(.W(ACC_W), .BW(BW)) u_acc (
      .clk, .rst_n, .en, .d, .inj(inj_c && inj_r[g]), .inj_bit, .q(acc[g]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_ACCUM;
      col <= '0; strip <= '0; row <= '0;
      scan_i <= '0; best_val <= '0; best_idx <= '0;
      dir <= '0; dir_valid <= 1'b0;
    end else begin
      dir_valid <= 1'b0;
      unique case (state)
        S_ACCUM: if (pix_valid) begin
          if (32'(col) == STRIP - 1) begin
            col <= '0;
            if (32'(strip) == NREG - 1) begin
              strip <= '0;
              row   <= (32'(row) == IMG_H - 1) ? '0 : row + 1'b1;
            end else strip <= strip + 1'b1;
          end else col <= col + 1'b1;
          if (last_pix) begin
            state  <= S_SCAN;
            scan_i <= '0;
          end
        end
        S_SCAN: begin
          if (scan_i == '0 || acc[scan_i] < best_val) begin
            best_val <= acc[scan_i];
            best_idx <= scan_i;
          end
          if (32'(scan_i) == NREG - 1) begin
            state <= S_CLEAR;
            dir_valid <= 1'b1;
            dir <= (scan_i == '0 || acc[scan_i] < best_val) ? scan_i : best_idx;
          end else scan_i <= scan_i + 1'b1;
        end
        default: state <= S_ACCUM;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (rst_n && state != S_ACCUM)
      assert (!pix_valid) else $error("oa_unit: pixel during inter-frame scan");

  initial assert (IMG_W % NREG == 0) else $error("oa_unit: IMG_W must split into NREG strips");
endmodule
