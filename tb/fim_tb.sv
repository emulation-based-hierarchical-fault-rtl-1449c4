// fim_tb: fault injection mechanism driving a bank of fault-injectable registers.
// Small map: 4 components with 2, 5, 1 and 2 registers. Every register of the map
// is an fi_reg holding zero, so each fault shows up as exactly one set bit.
// Checked: a fault_inject pulse in cycle t gives the strobes in t+1 and the
// flipped bit in t+2; strobes are one-hot and consistent with the location log;
// each scheme reaches every component; each mode keeps faults in its target.
module fim_tb;
  import hfi_pkg::*;
  localparam int NC = 4, NR = 10;
  localparam logic [NR-1:0][15:0] REG_W = {16'd6, 16'd6, 16'd16, 16'd1, 16'd7, 16'd4, 16'd2, 16'd8, 16'd5, 16'd3};
  localparam logic [NR-1:0][15:0] REG_C = {16'd3, 16'd3, 16'd2, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd0, 16'd0};

  logic clk = 0, rst_n = 0;
  logic en, tgt_load, tgt_step, tgt_ready, tgt_wrapped, inj_valid;
  fi_mode_e mode;
  fi_scheme_e scheme;
  logic [19:0] rate;
  logic [15:0] period;
  logic [1:0] load_c, tgt_c, inj_c;
  logic [3:0] load_r, tgt_r, inj_r;
  logic [15:0] load_b, tgt_b, inj_b, inject_bit;
  logic [NC-1:0] skip_c, inject_c;
  logic [NR-1:0] skip_r, inject_r;
  logic [31:0] fi_count;
  logic [NR-1:0][15:0] q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fim #(.NC(NC), .NR(NR), .REG_W(REG_W), .REG_C(REG_C)) dut (.*);

  for (genvar r = 0; r < NR; r++) begin : g_reg
    fi_reg #(.W(16)) u_r (.clk, .rst_n, .en(1'b1), .d(16'd0),
                          .inj(inject_c[REG_C[r]] && inject_r[r]), .inj_bit(inject_bit), .q(q[r]));
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // history of the fault_inject pulse and the location log
  logic fi_d1, fi_d2;
  logic [3:0] r_d1;
  logic [15:0] b_d1;
  logic v_d1;
  always_ff @(posedge clk) begin
    fi_d1 <= dut.fi; fi_d2 <= fi_d1;
    v_d1 <= inj_valid; r_d1 <= inj_r; b_d1 <= inj_b;
  end

  int comp_hits [NC];
  int in_target;

  // observe one cycle (at the negative edge)
  task automatic observe(input fi_mode_e m);
    int ones;
    ones = 0;
    for (int r = 0; r < NR; r++) ones += $countones(q[r]);
    // strobes one cycle after fault_inject
    check(inj_valid == fi_d1, "strobe latency");
    if (inj_valid) begin
      check(inject_c == NC'(1) << inj_c && inject_r == NR'(1) << inj_r, "one-hot decode");
      check(REG_C[inj_r] == 16'(inj_c) && inject_bit < REG_W[inj_r], "location inside map");
      comp_hits[inj_c]++;
      unique case (m)
        MODE_COMPONENT: in_target += (inj_c == tgt_c);
        MODE_REGISTER:  in_target += (inj_c == tgt_c && inj_r == 4'(FIRST(tgt_c)) + tgt_r);
        MODE_BIT:       in_target += (inj_c == tgt_c && inj_r == 4'(FIRST(tgt_c)) + tgt_r && inj_b == tgt_b);
        default:        in_target += 1;
      endcase
    end
    // the register bit flips two cycles after fault_inject
    check(ones == (fi_d2 ? 1 : 0), "flip two cycles after fault_inject");
    if (v_d1) check(q[r_d1] == 16'(1) << b_d1, "flipped bit matches log");
  endtask

  function automatic int FIRST(input logic [1:0] c);
    for (int r = 0; r < NR; r++) if (REG_C[r] == 16'(c)) return r;
    return 0;
  endfunction

  task automatic campaign(input fi_mode_e m, input fi_scheme_e s, input int n, output int nvalid);
    mode = m; scheme = s;
    foreach (comp_hits[i]) comp_hits[i] = 0;
    in_target = 0;
    repeat (4) @(negedge clk);
    nvalid = 0;
    repeat (n) begin
      @(negedge clk);
      observe(m);
      nvalid += inj_valid;
    end
  endtask

  initial begin
    int nv;
    en = 0; mode = MODE_SYSTEM; scheme = SCHEME_COMPONENT; rate = '1; period = 4;
    tgt_load = 0; tgt_step = 0; load_c = 0; load_r = 0; load_b = 0; skip_c = '0; skip_r = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); en = 1;
    // system mode, both schemes
    campaign(MODE_SYSTEM, SCHEME_COMPONENT, 2000, nv);
    check(nv >= 450, "faults injected");
    for (int c = 0; c < NC; c++) check(comp_hits[c] > 60, $sformatf("cw reaches component %0d", c));
    campaign(MODE_SYSTEM, SCHEME_BIT, 2000, nv);
    for (int c = 0; c < NC; c++) check(comp_hits[c] > 30, $sformatf("bw reaches component %0d", c));
    // component 1 bigger than component 0 under bit weighting (22 vs 8 bits)
    check(comp_hits[1] > 2 * comp_hits[0], "bit weighting follows size");
    // targeted modes
    @(negedge clk); tgt_load = 1; load_c = 1; load_r = 2; load_b = 3;
    @(negedge clk); tgt_load = 0;
    campaign(MODE_COMPONENT, SCHEME_BIT, 400, nv);
    check(nv > 50 && in_target == nv, "component mode stays in target");
    campaign(MODE_REGISTER, SCHEME_COMPONENT, 400, nv);
    check(nv > 50 && in_target == nv, "register mode stays in target");
    campaign(MODE_BIT, SCHEME_BIT, 400, nv);
    check(nv > 50 && in_target == nv, "bit mode stays in target");
    // disabled: nothing
    en = 0;
    campaign(MODE_SYSTEM, SCHEME_BIT, 200, nv);
    check(nv == 0, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
