// target_ctr: counter holding the location under analysis.
//
// In component, register and bit mode the faults are confined to one component,
// register or bit. This counter holds that target (tgt_c, tgt_r inside the
// component, tgt_b) and steps it through the system so that a campaign can visit
// every target of the level in turn: a step pulse advances the finest level fixed
// by the mode (component mode: next component; register mode: next register,
// carrying into the next component; bit mode: next bit, carrying into register
// and component), wrapping at the end of the map. Targets marked in the skip masks
// (components or registers found resilient at the coarser level) are passed over,
// which is how the coarse-to-fine analysis excludes them from the finer one. The
// counter advances one position per cycle while it rests on a skipped target, and
// ready is low while it does (skips apply in component, register and bit mode). load sets the target directly.
// wrapped pulses when a step passes the end of the map.
//
// The skip masks and the step/load interface are this design's choices.
module target_ctr
  import hfi_pkg::*;
#(
  parameter int unsigned NC = hfi_pkg::SYS_NC,
  parameter int unsigned NR = hfi_pkg::SYS_NR,
  parameter logic [NR-1:0][MAP_FIELD_W-1:0] REG_W = hfi_pkg::sys_reg_w(),
  parameter logic [NR-1:0][MAP_FIELD_W-1:0] REG_C = hfi_pkg::sys_reg_c(),
  localparam int unsigned CW = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned RW = (NR > 1) ? $clog2(NR) : 1,
  localparam int unsigned BW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fi_mode_e      mode,
  input  logic          load,
  input  logic [CW-1:0] load_c,
  input  logic [RW-1:0] load_r,
  input  logic [BW-1:0] load_b,
  input  logic          step,
  input  logic [NC-1:0] skip_c,
  input  logic [NR-1:0] skip_r,     // indexed by global register number
  output logic [CW-1:0] tgt_c,
  output logic [RW-1:0] tgt_r,
  output logic [BW-1:0] tgt_b,
  output logic          ready,
  output logic          wrapped
);
  `include "hfi_map.svh"

  localparam logic [NC-1:0][31:0] NREG  = map_nreg_tab();
  localparam logic [NC-1:0][31:0] FIRST = map_first_tab();

  logic [CW-1:0] nc;
  logic [RW-1:0] nrl;
  logic [BW-1:0] nbit;
  logic          nwrap;
  logic          on_skipped;

  // next position at the level fixed by the mode
  always_comb begin
    nc = tgt_c; nrl = tgt_r; nbit = tgt_b; nwrap = 1'b0;
    unique case (mode)
      MODE_BIT: begin
        if (32'(tgt_b) + 1 < 32'(REG_W[FIRST[tgt_c] + 32'(tgt_r)])) nbit = tgt_b + BW'(1);
        else begin
          nbit = '0;
          if (32'(tgt_r) + 1 < NREG[tgt_c]) nrl = tgt_r + RW'(1);
          else begin
            nrl = '0;
            if (32'(tgt_c) + 1 < NC) nc = tgt_c + CW'(1);
            else begin nc = '0; nwrap = 1'b1; end
          end
        end
      end
      MODE_REGISTER: begin
        nbit = '0;
        if (32'(tgt_r) + 1 < NREG[tgt_c]) nrl = tgt_r + RW'(1);
        else begin
          nrl = '0;
          if (32'(tgt_c) + 1 < NC) nc = tgt_c + CW'(1);
          else begin nc = '0; nwrap = 1'b1; end
        end
      end
      MODE_COMPONENT: begin
        nbit = '0; nrl = '0;
        if (32'(tgt_c) + 1 < NC) nc = tgt_c + CW'(1);
        else begin nc = '0; nwrap = 1'b1; end
      end
      default: ;
    endcase
    on_skipped = (mode != MODE_SYSTEM) &&
                 (skip_c[tgt_c] ||
                  ((mode == MODE_REGISTER || mode == MODE_BIT) && skip_r[FIRST[tgt_c] + 32'(tgt_r)]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tgt_c <= '0; tgt_r <= '0; tgt_b <= '0;
      wrapped <= 1'b0;
    end else begin
      wrapped <= 1'b0;
      if (load) begin
        tgt_c <= load_c; tgt_r <= load_r; tgt_b <= load_b;
      end else if (step || on_skipped) begin
        tgt_c <= nc; tgt_r <= nrl; tgt_b <= nbit;
        wrapped <= nwrap;
      end
    end
  end

  assign ready = !on_skipped;
endmodule
