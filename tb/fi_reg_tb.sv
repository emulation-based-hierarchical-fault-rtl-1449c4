// fi_reg_tb: random writes, holds and single-bit injections against a model.
module fi_reg_tb;
  localparam int W = 12;
  logic clk = 0, rst_n = 0;
  logic en, inj;
  logic [W-1:0] d, q, model;
  logic [15:0] inj_bit;
  int checks = 0, failures = 0;
  int flips = 0;
  always #5 clk = ~clk;

  fi_reg #(.W(W), .BW(16), .RST(12'h5A3)) dut (.clk, .rst_n, .en, .d, .inj, .inj_bit, .q);

  initial begin
    en = 0; inj = 0; d = 0; inj_bit = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++; if (q != 12'h5A3) begin failures++; $display("reset value %h", q); end
    rst_n = 1;
    model = 12'h5A3;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = $urandom_range(0, 1);
      d = W'($urandom);
      inj = ($urandom_range(0, 3) == 0);
      inj_bit = 16'($urandom_range(0, W + 2));
      @(posedge clk);
      model = en ? d : model;
      if (inj && inj_bit < W) begin model[inj_bit] = ~model[inj_bit]; flips++; end
      @(negedge clk);
      checks++;
      if (q != model) begin
        failures++;
        if (failures < 10) $display("step %0d q=%h expected %h", i, q, model);
      end
      en = 0; inj = 0;
    end
    checks++; if (flips < 100) failures++;
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
