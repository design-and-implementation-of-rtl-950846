// bch15_5_encoder: serial encoder for the (15,5) binary BCH code correcting
// 3 errors per 15-bit codeword (t=3, (15,5): g(x) = 1 + x + x^2 + x^4 + x^5 + x^8 + x^10).
//
// It is the generic serial encoder bch_encoder with the code's K and g(x)
// fixed: 5 information bits pass through unchanged in cycles 1..5 while the
// 10-stage LFSR divides by g(x), then the 10 parity bits follow in cycles
// 6..15. One codeword per 15 clocks, back to back.
//
// Interface: clk, reset (synchronous, active high), din (information bit,
// used while vdin is 1), vdin (1 in the 5 information cycles), dout (codeword
// bit, registered: the bit of cycle j appears in cycle j+1).
//
// The code parameters are those of the standard BCH construction over
// GF(2^4) with 1 + x + x^4; the five ports follow the published netlist.
module bch15_5_encoder (
  input  logic clk,
  input  logic reset,
  input  logic din,
  output logic vdin,
  output logic dout
);
  import bch_pkg::*;

  bch_encoder #(.N(BCH_N), .K(K_T3), .G(G_T3)) u_enc (
    .clk  (clk),
    .reset(reset),
    .din  (din),
    .vdin (vdin),
    .dout (dout)
  );

endmodule
