// hfi_top: emulation set-up of the hierarchical fault-injection framework.
//
// Two instances of the system under analysis run in lockstep on the same input:
// a fault-free one and one that receives faults. The system is a disparity-
// estimation (DE) kernel of DE_NC components followed by an obstacle-avoidance
// (OA) unit. The DE kernel itself is outside this module: its two instances feed
// their disparity streams in through gold_* and test_*, and the faulty one takes
// its injection strobes (de_inject_c, de_inject_r, inject_bit) from the ports.
// The OA units are inside: oa_gold on the fault-free stream, oa_test on the
// faulty stream with its eight accumulators wired to the fault injection
// mechanism as the last component of the map.
//
// The register map handed to the mechanism is DE_NR registers of DE_REG_W bits
// spread evenly over the DE_NC DE components, followed by the OA accumulators.
// With the defaults it has 13 components, 1813 registers and 130,136 flip-flops,
// matching the size of the evaluated system.
//
// err_mon compares the two instances: affected pixels per frame and wrong OA
// decisions. The fault injection mechanism (fim) is configured through the
// campaign ports: enable, mode, scheme, rate threshold, slot period, target load /
// step and the skip masks of the coarse-to-fine analysis. Timing of every part is
// described in its own module.
module hfi_top #(
  parameter int unsigned IMG_W    = 640,
  parameter int unsigned IMG_H    = 480,
  parameter int unsigned DISP_W   = 6,
  parameter int unsigned DE_NC    = hfi_pkg::DE_NC,
  parameter int unsigned DE_NR    = hfi_pkg::DE_NR,
  parameter int unsigned DE_REG_W = hfi_pkg::DE_REG_W,
  parameter int unsigned RATE_W   = 20,
  parameter int unsigned PER_W    = 16,
  localparam int unsigned OA_NR   = 8,
  localparam int unsigned NC      = DE_NC + 1,
  localparam int unsigned NR      = DE_NR + OA_NR,
  localparam int unsigned CW      = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned RW      = (NR > 1) ? $clog2(NR) : 1,
  localparam int unsigned BW      = 16,
  localparam int unsigned DIR_W   = $clog2(OA_NR)
) (
  input  logic                clk,
  input  logic                rst_n,
  // campaign configuration
  input  logic                fi_en,
  input  hfi_pkg::fi_mode_e            mode,
  input  hfi_pkg::fi_scheme_e          scheme,
  input  logic [RATE_W-1:0]   rate,
  input  logic [PER_W-1:0]    period,
  input  logic                tgt_load,
  input  logic [CW-1:0]       load_c,
  input  logic [RW-1:0]       load_r,
  input  logic [BW-1:0]       load_b,
  input  logic                tgt_step,
  input  logic [NC-1:0]       skip_c,
  input  logic [NR-1:0]       skip_r,
  output logic [CW-1:0]       tgt_c,
  output logic [RW-1:0]       tgt_r,
  output logic [BW-1:0]       tgt_b,
  output logic                tgt_ready,
  output logic                tgt_wrapped,
  output logic [31:0]         fi_count,
  // injection strobes to the faulty DE instance
  output logic [DE_NC-1:0]    de_inject_c,
  output logic [DE_NR-1:0]    de_inject_r,
  output logic [BW-1:0]       inject_bit,
  // injected-location log
  output logic                inj_valid,
  output logic [CW-1:0]       inj_c,
  output logic [RW-1:0]       inj_r,
  output logic [BW-1:0]       inj_b,
  // disparity streams of the two DE instances
  input  logic                gold_valid,
  input  logic [DISP_W-1:0]   gold_disp,
  input  logic                test_valid,
  input  logic [DISP_W-1:0]   test_disp,
  input  logic                frame_end,
  // OA decisions and comparison results
  output logic                gold_dir_valid,
  output logic [DIR_W-1:0]    gold_dir,
  output logic                test_dir_valid,
  output logic [DIR_W-1:0]    test_dir,
  output logic                frame_done,
  output logic [31:0]         frame_err,
  output logic [31:0]         frame_pix,
  output logic [31:0]         total_err,
  output logic [31:0]         frames,
  output logic [31:0]         err_frames,
  output logic [31:0]         decisions,
  output logic [31:0]         wrong_decisions
);
  localparam int unsigned OA_ACC_W = $clog2((IMG_W / OA_NR) * IMG_H * ((1 << DISP_W) - 1) + 1);
  localparam int unsigned DE_BIG   = DE_NR % DE_NC;
  localparam int unsigned DE_PER   = DE_NR / DE_NC;

  function automatic logic [NR-1:0][hfi_pkg::MAP_FIELD_W-1:0] top_reg_w();
    logic [NR-1:0][hfi_pkg::MAP_FIELD_W-1:0] m;
    for (int unsigned r = 0; r < NR; r++) m[r] = hfi_pkg::MAP_FIELD_W'(r < DE_NR ? DE_REG_W : OA_ACC_W);
    return m;
  endfunction

  function automatic logic [NR-1:0][hfi_pkg::MAP_FIELD_W-1:0] top_reg_c();
    logic [NR-1:0][hfi_pkg::MAP_FIELD_W-1:0] m;
    for (int unsigned r = 0; r < NR; r++)
      if (r >= DE_NR)                    m[r] = hfi_pkg::MAP_FIELD_W'(DE_NC);
      else if (r < DE_BIG * (DE_PER + 1)) m[r] = hfi_pkg::MAP_FIELD_W'(r / (DE_PER + 1));
      else                               m[r] = hfi_pkg::MAP_FIELD_W'(DE_BIG + (r - DE_BIG * (DE_PER + 1)) / DE_PER);
    return m;
  endfunction

  localparam logic [NR-1:0][hfi_pkg::MAP_FIELD_W-1:0] REG_W = top_reg_w();
  localparam logic [NR-1:0][hfi_pkg::MAP_FIELD_W-1:0] REG_C = top_reg_c();

  logic [NC-1:0] inject_c;
  logic [NR-1:0] inject_r;
  logic [OA_NR-1:0][OA_ACC_W-1:0] acc_gold, acc_test;

  fim #(.NC(NC), .NR(NR), .REG_W(REG_W), .REG_C(REG_C), .RATE_W(RATE_W), .PER_W(PER_W)) u_fim (
    .clk, .rst_n, .en(fi_en), .mode, .scheme, .rate, .period,
    .tgt_load, .load_c, .load_r, .load_b, .tgt_step, .skip_c, .skip_r,
    .tgt_c, .tgt_r, .tgt_b, .tgt_ready, .tgt_wrapped,
    .inject_c, .inject_r, .inject_bit,
    .inj_valid, .inj_c, .inj_r, .inj_b, .fi_count);

  assign de_inject_c = inject_c[DE_NC-1:0];
  assign de_inject_r = inject_r[DE_NR-1:0];

  oa_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DISP_W(DISP_W), .NREG(OA_NR)) oa_gold (
    .clk, .rst_n, .pix_valid(gold_valid), .pix_disp(gold_disp),
    .inj_c(1'b0), .inj_r('0), .inj_bit('0),
    .dir(gold_dir), .dir_valid(gold_dir_valid), .acc(acc_gold));

  oa_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DISP_W(DISP_W), .NREG(OA_NR)) oa_test (
    .clk, .rst_n, .pix_valid(test_valid), .pix_disp(test_disp),
    .inj_c(inject_c[DE_NC]), .inj_r(inject_r[NR-1:DE_NR]), .inj_bit(inject_bit),
    .dir(test_dir), .dir_valid(test_dir_valid), .acc(acc_test));

  err_mon #(.DISP_W(DISP_W), .DIR_W(DIR_W)) u_mon (
    .clk, .rst_n, .gold_valid, .gold_disp, .test_valid, .test_disp, .frame_end,
    .gold_dir_valid, .gold_dir, .test_dir_valid, .test_dir,
    .frame_done, .frame_err, .frame_pix, .total_err, .frames, .err_frames,
    .decisions, .wrong_decisions);
endmodule
