// hfi_pkg: types and constants shared by the hierarchical fault-injection framework.
//
// The framework sees the circuit under analysis (CUA) as a three-level hierarchy of
// memory elements: components, registers inside a component, and bits inside a
// register. That hierarchy is given to every module as a "register map": for each
// register r (numbered so that the registers of one component are contiguous) its
// width in bits and the component it belongs to, both packed into 16-bit fields.
//
// The default map is that of the evaluated system: a disparity-estimation kernel
// of 12 components plus an obstacle-avoidance unit, 1813 registers in total and
// about 130,000 flip-flops. Component, register and flip-flop totals follow the
// evaluation; how the kernel's 1805 registers split between its components and how
// wide each is were not published, so they are spread evenly here (72-bit registers,
// 150 or 151 per component). The obstacle-avoidance unit is component 12, with its
// eight 22-bit region accumulators.
package hfi_pkg;

  // Analysis level: where faults may land.
  typedef enum logic [1:0] {
    MODE_SYSTEM    = 2'd0,  // any bit of the whole system
    MODE_COMPONENT = 2'd1,  // any bit of the component under analysis
    MODE_REGISTER  = 2'd2,  // any bit of the register under analysis
    MODE_BIT       = 2'd3   // exactly the bit under analysis
  } fi_mode_e;

  // Probability model used by the selection mechanisms.
  typedef enum logic {
    SCHEME_COMPONENT = 1'b0,  // equal probability per component, then per register, then per bit
    SCHEME_BIT       = 1'b1   // equal probability per flip-flop
  } fi_scheme_e;

  localparam int unsigned MAP_FIELD_W = 16;

  // ---------------------------------------------------------------- default system map
  localparam int unsigned DE_NC     = 12;    // disparity-estimation components
  localparam int unsigned DE_NR     = 1805;  // their registers (1813 minus the 8 of the OA unit)
  localparam int unsigned DE_REG_W  = 72;    // assumed uniform register width
  localparam int unsigned OA_NR     = 8;     // OA region accumulators
  localparam int unsigned OA_ACC_W  = 22;    // width of one accumulator (see oa_unit)
  localparam int unsigned SYS_NC    = DE_NC + 1;
  localparam int unsigned SYS_NR    = DE_NR + OA_NR;

  localparam int unsigned DE_BIG    = DE_NR % DE_NC;          // components holding one extra register
  localparam int unsigned DE_PER    = DE_NR / DE_NC;          // registers in the others

  function automatic int unsigned sys_comp_of(int unsigned r);
    if (r >= DE_NR) return DE_NC;
    if (r < DE_BIG * (DE_PER + 1)) return r / (DE_PER + 1);
    return DE_BIG + (r - DE_BIG * (DE_PER + 1)) / DE_PER;
  endfunction

  function automatic logic [SYS_NR-1:0][MAP_FIELD_W-1:0] sys_reg_w();
    logic [SYS_NR-1:0][MAP_FIELD_W-1:0] m;
    for (int unsigned r = 0; r < SYS_NR; r++)
      m[r] = MAP_FIELD_W'(r < DE_NR ? DE_REG_W : OA_ACC_W);
    return m;
  endfunction

  function automatic logic [SYS_NR-1:0][MAP_FIELD_W-1:0] sys_reg_c();
    logic [SYS_NR-1:0][MAP_FIELD_W-1:0] m;
    for (int unsigned r = 0; r < SYS_NR; r++)
      m[r] = MAP_FIELD_W'(sys_comp_of(r));
    return m;
  endfunction

  // ---------------------------------------------------------------- LFSR feedback taps
  // Taps (1-based bit positions) of maximal-length Fibonacci LFSRs, widths 2..32.
  function automatic logic [31:0] lfsr_taps(int unsigned w);
    logic [31:0] t;
    t = '0;
    case (w)
      2:  begin t[1] = 1; t[0] = 1; end
      3:  begin t[2] = 1; t[1] = 1; end
      4:  begin t[3] = 1; t[2] = 1; end
      5:  begin t[4] = 1; t[2] = 1; end
      6:  begin t[5] = 1; t[4] = 1; end
      7:  begin t[6] = 1; t[5] = 1; end
      8:  begin t[7] = 1; t[5] = 1; t[4] = 1; t[3] = 1; end
      9:  begin t[8] = 1; t[4] = 1; end
      10: begin t[9] = 1; t[6] = 1; end
      11: begin t[10] = 1; t[8] = 1; end
      12: begin t[11] = 1; t[5] = 1; t[3] = 1; t[0] = 1; end
      13: begin t[12] = 1; t[3] = 1; t[2] = 1; t[0] = 1; end
      14: begin t[13] = 1; t[4] = 1; t[2] = 1; t[0] = 1; end
      15: begin t[14] = 1; t[13] = 1; end
      16: begin t[15] = 1; t[14] = 1; t[12] = 1; t[3] = 1; end
      17: begin t[16] = 1; t[13] = 1; end
      18: begin t[17] = 1; t[10] = 1; end
      19: begin t[18] = 1; t[5] = 1; t[1] = 1; t[0] = 1; end
      20: begin t[19] = 1; t[16] = 1; end
      21: begin t[20] = 1; t[18] = 1; end
      22: begin t[21] = 1; t[20] = 1; end
      23: begin t[22] = 1; t[17] = 1; end
      24: begin t[23] = 1; t[22] = 1; t[21] = 1; t[16] = 1; end
      25: begin t[24] = 1; t[21] = 1; end
      26: begin t[25] = 1; t[5] = 1; t[1] = 1; t[0] = 1; end
      27: begin t[26] = 1; t[4] = 1; t[1] = 1; t[0] = 1; end
      28: begin t[27] = 1; t[24] = 1; end
      29: begin t[28] = 1; t[26] = 1; end
      30: begin t[29] = 1; t[5] = 1; t[3] = 1; t[0] = 1; end
      31: begin t[30] = 1; t[27] = 1; end
      default: begin t[31] = 1; t[21] = 1; t[1] = 1; t[0] = 1; end
    endcase
    return t;
  endfunction

endpackage
