// bch_lfsr: (n-k)-stage division LFSR of a systematic cyclic encoder.
//
// Stages b[0]..b[R-1] (R = n-k). Each cycle with switch S1 closed the
// feedback f = din XOR b[R-1] enters b[0] and is added into every stage
// b[i] (i = 1..R-1) whose generator coefficient g_i is 1:
//     b[0] <= f,  b[i] <= b[i-1] XOR (g_i AND f).
// After the k information bits (highest-degree coefficient first) the
// register holds b(x) = x^{n-k} i(x) mod g(x). With S1 open the feedback is
// forced to 0, the register is a plain shift register, and parity_bit = b[R-1]
// presents the parity coefficients b_{R-1}, b_{R-2}, ..., b_0 on successive
// cycles; after R such cycles the register is all zero again, ready for the
// next codeword without an explicit clear.
//
// Interface: clk, reset (synchronous, clears all stages), s1_on, din,
// parity_bit (combinational from the stage register, no path from inputs).
//
// The stage order, tap placement and switch S1 follow the classic encoding
// circuit; the synchronous reset is this design's choice.
module bch_lfsr #(
  parameter int unsigned R = 4,
  parameter logic [R:0]  G = 5'b1_0011
) (
  input  logic clk,
  input  logic reset,
  input  logic s1_on,
  input  logic din,
  output logic parity_bit
);
  logic [R-1:0] b;
  logic         fb;

  assign fb         = s1_on & (din ^ b[R-1]);
  assign parity_bit = b[R-1];

  always_ff @(posedge clk) begin
    if (reset) begin
      b <= '0;
    end else begin
      b[0] <= fb;
      for (int i = 1; i < int'(R); i++)
        b[i] <= b[i-1] ^ (G[i] & fb);
    end
  end

  initial begin
    assert (G[0] && G[R]) else $error("bch_lfsr: g(x) must have g_0 = g_{n-k} = 1");
  end

endmodule
