// cw_sel: component-weighted selection mechanism.
//
// Picks the location of the next fault so that every component is equally likely,
// then every register of that component, then every bit of that register:
// P(flip-flop) = 1/NC * 1/NR(c) * 1/NB(r). Each level has its own free-running
// LFSR. The draw u of a level is mapped to an index in [0, n) by multiply-shift,
// idx = (u * n) >> K, where n is the number of choices at that level (NC, the
// register count of the chosen component, the width of the chosen register). The
// LFSRs are EXTRA bits longer than log2 of the largest n, which keeps the deviation
// from equal probabilities below 2^-EXTRA relative; an LFSR only log2(n) long, as
// in the framework description, cannot split a count that is not a power of two
// evenly and never yields zero.
//
// Levels fixed by the analysis mode come from the target inputs instead of the
// LFSRs: component mode fixes the component, register mode also the register,
// bit mode all three. The selection is combinational from registered state and is
// valid every cycle: sel_c (component), sel_r (global register index), sel_b (bit).
module cw_sel
  import hfi_pkg::*;
#(
  parameter int unsigned NC = hfi_pkg::SYS_NC,
  parameter int unsigned NR = hfi_pkg::SYS_NR,
  parameter logic [NR-1:0][MAP_FIELD_W-1:0] REG_W = hfi_pkg::sys_reg_w(),
  parameter logic [NR-1:0][MAP_FIELD_W-1:0] REG_C = hfi_pkg::sys_reg_c(),
  parameter int unsigned EXTRA = 8,
  localparam int unsigned CW = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned RW = (NR > 1) ? $clog2(NR) : 1,
  localparam int unsigned LW_MAX = 32,
  localparam int unsigned BW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fi_mode_e      mode,
  input  logic [CW-1:0] tgt_c,    // component under analysis
  input  logic [RW-1:0] tgt_r,    // register under analysis, index inside tgt_c
  input  logic [BW-1:0] tgt_b,    // bit under analysis
  output logic [CW-1:0] sel_c,
  output logic [RW-1:0] sel_r,
  output logic [BW-1:0] sel_b
);
  `include "hfi_map.svh"

  localparam logic [NC-1:0][31:0] NREG  = map_nreg_tab();
  localparam logic [NC-1:0][31:0] FIRST = map_first_tab();
  localparam int unsigned MAXR = map_maxr();
  localparam int unsigned MAXW = map_maxw();
  localparam int unsigned KC = ($clog2(NC + 1) + EXTRA > LW_MAX) ? LW_MAX : $clog2(NC + 1) + EXTRA;
  localparam int unsigned KR = ($clog2(MAXR + 1) + EXTRA > LW_MAX) ? LW_MAX : $clog2(MAXR + 1) + EXTRA;
  localparam int unsigned KB = ($clog2(MAXW + 1) + EXTRA > LW_MAX) ? LW_MAX : $clog2(MAXW + 1) + EXTRA;

  logic [KC-1:0] uc;
  logic [KR-1:0] ur;
  logic [KB-1:0] ub;

  lfsr #(.W(KC), .SEED(KC'(32'h1D3))) u_lfsr_c (.clk, .rst_n, .en(1'b1), .q(uc));
  lfsr #(.W(KR), .SEED(KR'(32'h2B7))) u_lfsr_r (.clk, .rst_n, .en(1'b1), .q(ur));
  lfsr #(.W(KB), .SEED(KB'(32'h359))) u_lfsr_b (.clk, .rst_n, .en(1'b1), .q(ub));

  logic [CW-1:0] c;
  logic [RW-1:0] rl, rg;
  logic [31:0]   nr, nb;
  logic [63:0]   prod_c, prod_r, prod_b;

  always_comb begin
    prod_c = 64'(uc) * 64'(NC);
    c      = (mode == MODE_SYSTEM) ? CW'(prod_c >> KC) : tgt_c;
    nr     = NREG[c];
    prod_r = 64'(ur) * 64'(nr);
    rl     = (mode == MODE_SYSTEM || mode == MODE_COMPONENT) ? RW'(prod_r >> KR) : tgt_r;
    rg     = RW'(FIRST[c]) + rl;
    nb     = 32'(REG_W[rg]);
    prod_b = 64'(ub) * 64'(nb);
    sel_b  = (mode == MODE_BIT) ? tgt_b : BW'(prod_b >> KB);
    sel_c  = c;
    sel_r  = rg;
  end

  initial assert (NC >= 1 && NR >= NC) else $error("cw_sel: bad register map");
endmodule
