// bch15_7_encoder: serial encoder for the (15,7) binary BCH code correcting
// 2 errors per 15-bit codeword (t=2, (15,7): g(x) = 1 + x^4 + x^6 + x^7 + x^8).
//
// It is the generic serial encoder bch_encoder with the code's K and g(x)
// fixed: 7 information bits pass through unchanged in cycles 1..7 while the
// 8-stage LFSR divides by g(x), then the 8 parity bits follow in cycles
// 8..15. One codeword per 15 clocks, back to back.
//
// Interface: clk, reset (synchronous, active high), din (information bit,
// used while vdin is 1), vdin (1 in the 7 information cycles), dout (codeword
// bit, registered: the bit of cycle j appears in cycle j+1).
//
// The code parameters are those of the standard BCH construction over
// GF(2^4) with 1 + x + x^4; the five ports follow the published netlist.
module bch15_7_encoder (
  input  logic clk,
  input  logic reset,
  input  logic din,
  output logic vdin,
  output logic dout
);
  import bch_pkg::*;

  bch_encoder #(.N(BCH_N), .K(K_T2), .G(G_T2)) u_enc (
    .clk  (clk),
    .reset(reset),
    .din  (din),
    .vdin (vdin),
    .dout (dout)
  );

endmodule
