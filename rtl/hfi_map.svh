// hfi_map.svh: constant functions that derive the hierarchy tables of a register
// map. Included inside a module body that has the parameters NC, NR, REG_W and
// REG_C (see hfi_pkg for the map format). All tables hold 32-bit entries.
//   map_roff_tab()   [NR:0]  flat index of the first flip-flop of each register;
//                            entry NR is the total number of flip-flops
//   map_nreg_tab()   [NC-1:0] registers in each component
//   map_first_tab()  [NC-1:0] global index of the first register of each component
//   map_cbits_tab()  [NC-1:0] flip-flops in each component
//   map_maxr()       largest register count of a component
//   map_maxw()       widest register

function automatic logic [NR:0][31:0] map_roff_tab();
  logic [NR:0][31:0] t;
  t[0] = 0;
  for (int unsigned r = 0; r < NR; r++) t[r+1] = t[r] + 32'(REG_W[r]);
  return t;
endfunction

function automatic logic [NC-1:0][31:0] map_nreg_tab();
  logic [NC-1:0][31:0] t;
  t = '0;
  for (int unsigned r = 0; r < NR; r++) t[REG_C[r]] = t[REG_C[r]] + 1;
  return t;
endfunction

function automatic logic [NC-1:0][31:0] map_first_tab();
  logic [NC-1:0][31:0] t;
  for (int unsigned c = 0; c < NC; c++) t[c] = NR;
  for (int r = NR - 1; r >= 0; r--) t[REG_C[r]] = r;
  return t;
endfunction

function automatic logic [NC-1:0][31:0] map_cbits_tab();
  logic [NC-1:0][31:0] t;
  t = '0;
  for (int unsigned r = 0; r < NR; r++) t[REG_C[r]] = t[REG_C[r]] + 32'(REG_W[r]);
  return t;
endfunction

function automatic int unsigned map_maxr();
  logic [NC-1:0][31:0] t;
  int unsigned m = 1;
  t = map_nreg_tab();
  for (int unsigned c = 0; c < NC; c++) if (t[c] > m) m = t[c];
  return m;
endfunction

function automatic int unsigned map_maxw();
  int unsigned m = 1;
  for (int unsigned r = 0; r < NR; r++) if (32'(REG_W[r]) > m) m = 32'(REG_W[r]);
  return m;
endfunction
