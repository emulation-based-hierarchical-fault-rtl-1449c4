// lfsr: maximal-length Fibonacci linear-feedback shift register.
//
// The random source of every selection mechanism of the fault-injection framework
// (the "LFSR" of the basic counter/LFSR/decoder structure). Each enabled clock the
// register shifts left by one and the XOR of its tap bits enters at bit 0. With the
// taps of hfi_pkg::lfsr_taps the state runs through all 2^W-1 non-zero values before
// repeating, so it never holds zero.
//
// Interface: clk, active-low synchronous rst_n (loads SEED, forced non-zero),
// en (shift this cycle), q (current state, a registered output).
// Widths 2..32 are supported; the tap table is this design's choice.
module lfsr #(
  parameter int unsigned    W    = 16,
  parameter logic [W-1:0]   SEED = W'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] q
);
  localparam logic [31:0]  TAPS32 = hfi_pkg::lfsr_taps(W);
  localparam logic [W-1:0] TAPS   = TAPS32[W-1:0];
  localparam logic [W-1:0] SEED_NZ = (SEED == '0) ? W'(1) : SEED;

  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= SEED_NZ;
    else if (en) q <= {q[W-2:0], fb};
  end

  initial assert (W >= 2 && W <= 32) else $error("lfsr: W must be 2..32");
endmodule
