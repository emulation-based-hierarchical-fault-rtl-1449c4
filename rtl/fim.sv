// fim: hierarchical fault injection mechanism.
//
// Combines the four sub-mechanisms of the framework. ser_ctrl decides when a fault
// is injected (fault_inject pulse). The component, register and bit selection run
// continuously in two versions, component-weighted (cw_sel) and bit-weighted
// (bw_sel); the scheme input chooses which one is used. The analysis mode (system,
// component, register, bit) limits the faults to the whole system or to the
// target held by target_ctr. On a fault_inject pulse the chosen location is
// registered and decoded into the one-hot strobes that reach the circuit: one
// injectC per component, one injectR per register (global numbering) and the
// index of the bit to invert. A fault is dropped when it arrives while the target
// counter is passing over skipped targets.
//
// Timing: fault_inject in cycle t, inject strobes and the location log (inj_valid,
// inj_c, inj_r, inj_b) in cycle t+1, the flipped bit visible in the register in
// cycle t+2, so every fault lands within 2 cycles. The strobes last one cycle.
module fim
  import hfi_pkg::*;
#(
  parameter int unsigned NC = hfi_pkg::SYS_NC,
  parameter int unsigned NR = hfi_pkg::SYS_NR,
  parameter logic [NR-1:0][MAP_FIELD_W-1:0] REG_W = hfi_pkg::sys_reg_w(),
  parameter logic [NR-1:0][MAP_FIELD_W-1:0] REG_C = hfi_pkg::sys_reg_c(),
  parameter int unsigned RATE_W = 20,
  parameter int unsigned PER_W  = 16,
  localparam int unsigned CW = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned RW = (NR > 1) ? $clog2(NR) : 1,
  localparam int unsigned BW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // campaign configuration
  input  logic              en,
  input  fi_mode_e          mode,
  input  fi_scheme_e        scheme,
  input  logic [RATE_W-1:0] rate,
  input  logic [PER_W-1:0]  period,
  // target under analysis
  input  logic              tgt_load,
  input  logic [CW-1:0]     load_c,
  input  logic [RW-1:0]     load_r,
  input  logic [BW-1:0]     load_b,
  input  logic              tgt_step,
  input  logic [NC-1:0]     skip_c,
  input  logic [NR-1:0]     skip_r,
  output logic [CW-1:0]     tgt_c,
  output logic [RW-1:0]     tgt_r,
  output logic [BW-1:0]     tgt_b,
  output logic              tgt_ready,
  output logic              tgt_wrapped,
  // injection strobes to the circuit under analysis
  output logic [NC-1:0]     inject_c,
  output logic [NR-1:0]     inject_r,
  output logic [BW-1:0]     inject_bit,
  // log of the injected location
  output logic              inj_valid,
  output logic [CW-1:0]     inj_c,
  output logic [RW-1:0]     inj_r,
  output logic [BW-1:0]     inj_b,
  output logic [31:0]       fi_count
);
  logic fi;
  logic [CW-1:0] cw_c, bw_c;
  logic [RW-1:0] cw_r, bw_r;
  logic [BW-1:0] cw_b, bw_b;

  ser_ctrl #(.RATE_W(RATE_W), .PER_W(PER_W)) u_ser (
    .clk, .rst_n, .en, .rate, .period, .fi, .fi_count);

  target_ctr #(.NC(NC), .NR(NR), .REG_W(REG_W), .REG_C(REG_C)) u_tgt (
    .clk, .rst_n, .mode, .load(tgt_load), .load_c, .load_r, .load_b, .step(tgt_step),
    .skip_c, .skip_r, .tgt_c, .tgt_r, .tgt_b, .ready(tgt_ready), .wrapped(tgt_wrapped));

  cw_sel #(.NC(NC), .NR(NR), .REG_W(REG_W), .REG_C(REG_C)) u_cw (
    .clk, .rst_n, .mode, .tgt_c, .tgt_r, .tgt_b, .sel_c(cw_c), .sel_r(cw_r), .sel_b(cw_b));

  bw_sel #(.NC(NC), .NR(NR), .REG_W(REG_W), .REG_C(REG_C)) u_bw (
    .clk, .rst_n, .mode, .tgt_c, .tgt_r, .tgt_b, .sel_c(bw_c), .sel_r(bw_r), .sel_b(bw_b));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      inj_valid <= 1'b0;
      inj_c <= '0; inj_r <= '0; inj_b <= '0;
    end else begin
      inj_valid <= fi && tgt_ready;
      if (fi && tgt_ready) begin
        inj_c <= (scheme == SCHEME_BIT) ? bw_c : cw_c;
        inj_r <= (scheme == SCHEME_BIT) ? bw_r : cw_r;
        inj_b <= (scheme == SCHEME_BIT) ? bw_b : cw_b;
      end
    end
  end

  // decoders
  always_comb begin
    for (int unsigned c = 0; c < NC; c++) inject_c[c] = inj_valid && (32'(inj_c) == c);
    for (int unsigned r = 0; r < NR; r++) inject_r[r] = inj_valid && (32'(inj_r) == r);
    inject_bit = inj_b;
  end

  // bus rules: at most one component strobed, and the register belongs to it
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert ((inject_c & (inject_c - NC'(1))) == '0) else $error("fim: several components strobed");
      if (inj_valid)
        assert (32'(REG_C[inj_r]) == 32'(inj_c)) else $error("fim: register outside component");
    end
  end
endmodule
