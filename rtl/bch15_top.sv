// bch15_top: the three serial (15,k) binary BCH encoders side by side.
//
//   t = 1: (15,11) code, g(x) = 1 + x + x^4                          ports *_t1
//   t = 2: (15,7)  code, g(x) = 1 + x^4 + x^6 + x^7 + x^8            ports *_t2
//   t = 3: (15,5)  code, g(x) = 1 + x + x^2 + x^4 + x^5 + x^8 + x^10 ports *_t3
//
// The encoders are independent: each frames its own 15-bit codewords and
// asks for information bits with its own vdin. They trade rate for
// correcting power: 11, 7 or 5 information bits per 15 sent.
//
// Interface: clk and reset (synchronous, active high) are shared, so after
// reset all three start their frames on the same cycle; din_tX, vdin_tX and
// dout_tX belong to encoder X. Timing: dout_tX is registered, one cycle after
// the cycle its bit belongs to.
//
// The three codes are the ones the encoder family is defined by; placing them
// in one top with a shared clock and reset is this design's choice.
module bch15_top (
  input  logic clk,
  input  logic reset,
  input  logic din_t1,
  output logic vdin_t1,
  output logic dout_t1,
  input  logic din_t2,
  output logic vdin_t2,
  output logic dout_t2,
  input  logic din_t3,
  output logic vdin_t3,
  output logic dout_t3
);

  bch15_11_encoder u_t1 (.clk(clk), .reset(reset), .din(din_t1), .vdin(vdin_t1), .dout(dout_t1));
  bch15_7_encoder  u_t2 (.clk(clk), .reset(reset), .din(din_t2), .vdin(vdin_t2), .dout(dout_t2));
  bch15_5_encoder  u_t3 (.clk(clk), .reset(reset), .din(din_t3), .vdin(vdin_t3), .dout(dout_t3));

endmodule
