// fi_reg: fault-injectable register.
//
// An ordinary enabled register with a 2-1 multiplexer in front of it: in normal
// operation it loads d when en is high and holds otherwise; when inj is high the
// multiplexer instead loads the word it would have stored with bit inj_bit
// inverted. The result is the state a single event upset leaves right after the
// clock edge. Every register of a circuit under analysis is built from this cell;
// inj is the AND of the component's injectC and the register's injectR.
//
// Timing: the flipped value is visible on q the cycle after inj. An inj_bit at or
// beyond W flips nothing. Reset (synchronous, active low) loads RST.
// The multiplexer per register follows the framework description; injecting into
// the value being written rather than the old one is this design's choice.
module fi_reg #(
  parameter int unsigned  W   = 8,
  parameter int unsigned  BW  = 16,
  parameter logic [W-1:0] RST = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [W-1:0]  d,
  input  logic          inj,
  input  logic [BW-1:0] inj_bit,
  output logic [W-1:0]  q
);
  logic [W-1:0] nxt, mask;

  always_comb begin
    nxt  = en ? d : q;
    mask = '0;
    for (int unsigned i = 0; i < W; i++) mask[i] = (32'(inj_bit) == i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)   q <= RST;
    else if (inj) q <= nxt ^ mask;
    else          q <= nxt;
  end
endmodule
