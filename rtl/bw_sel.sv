// bw_sel: bit-weighted selection mechanism.
//
// Picks the location of the next fault so that every flip-flop inside the current
// scope is equally likely: P(flip-flop) = 1 / (flip-flops in scope), and a
// component is therefore hit in proportion to its size. All flip-flops of the map
// are numbered 0..TOTAL-1 register after register. One free-running LFSR draws a
// number u, which is mapped to an offset in the scope by multiply-shift,
// off = (u * n) >> K, n being the scope size (K = log2(TOTAL) + EXTRA bits, so the
// split is even to within 2^-EXTRA relative). The scope depends on the mode:
// system mode the whole map, component mode the component under analysis,
// register mode the register under analysis; bit mode takes the target bit as is.
// The flat index is then decoded by range comparison against the first-bit
// offset of every register, which yields register, component and bit.
//
// The single LFSR and the range decode follow the framework description; the
// multiply-shift scaling, the LFSR length margin and the per-mode scope are this
// design's choices. Outputs are combinational from registered state and valid
// every cycle: sel_c, sel_r (global register index), sel_b.
module bw_sel
  import hfi_pkg::*;
#(
  parameter int unsigned NC = hfi_pkg::SYS_NC,
  parameter int unsigned NR = hfi_pkg::SYS_NR,
  parameter logic [NR-1:0][MAP_FIELD_W-1:0] REG_W = hfi_pkg::sys_reg_w(),
  parameter logic [NR-1:0][MAP_FIELD_W-1:0] REG_C = hfi_pkg::sys_reg_c(),
  parameter int unsigned EXTRA = 8,
  localparam int unsigned CW = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned RW = (NR > 1) ? $clog2(NR) : 1,
  localparam int unsigned BW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fi_mode_e      mode,
  input  logic [CW-1:0] tgt_c,
  input  logic [RW-1:0] tgt_r,    // index inside tgt_c
  input  logic [BW-1:0] tgt_b,
  output logic [CW-1:0] sel_c,
  output logic [RW-1:0] sel_r,
  output logic [BW-1:0] sel_b
);
  `include "hfi_map.svh"

  localparam logic [NR:0][31:0]   ROFF  = map_roff_tab();
  localparam logic [NC-1:0][31:0] FIRST = map_first_tab();
  localparam logic [NC-1:0][31:0] CBITS = map_cbits_tab();
  localparam int unsigned TOTAL = ROFF[NR];
  localparam int unsigned K = ($clog2(TOTAL + 1) + EXTRA > 32) ? 32 : $clog2(TOTAL + 1) + EXTRA;

  logic [K-1:0] u;
  lfsr #(.W(K), .SEED(K'(32'h0ACE1))) u_lfsr (.clk, .rst_n, .en(1'b1), .q(u));

  logic [31:0] base, n, flat, tr_g;
  logic [63:0] prod;
  logic [RW-1:0] r;

  always_comb begin
    tr_g = FIRST[tgt_c] + 32'(tgt_r);
    unique case (mode)
      MODE_SYSTEM:    begin base = 32'd0;             n = TOTAL;               end
      MODE_COMPONENT: begin base = ROFF[FIRST[tgt_c]]; n = CBITS[tgt_c];        end
      default:        begin base = ROFF[tr_g];         n = 32'(REG_W[tr_g]);    end
    endcase
    prod = 64'(u) * 64'(n);
    flat = (mode == MODE_BIT) ? base + 32'(tgt_b) : base + 32'(prod >> K);
    // range decode: last register whose first flip-flop is at or below flat
    r = '0;
    for (int unsigned k = 1; k < NR; k++)
      if (flat >= ROFF[k]) r = RW'(k);
    sel_r = r;
    sel_c = CW'(REG_C[r]);
    sel_b = BW'(flat - ROFF[r]);
  end
endmodule
