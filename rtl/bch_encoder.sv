// bch_encoder: serial systematic (N,K) cyclic/BCH encoder.
//
// One codeword of N bits is sent every N clock cycles, one bit per cycle.
// Cycles 1..K: the information bit on din is sent unchanged (switch S2 in
// position 2) and fed into the division LFSR (switch S1 closed). Cycles
// K+1..N: din is ignored, the LFSR feedback is opened, and the N-K parity bits
// are shifted out of the LFSR's last stage (S2 in position 1). The codeword is
// c(x) = x^{N-K} i(x) + b(x), with the highest-degree bit sent first.
//
// Interface:
//   clk, reset  - clock; synchronous active-high reset restarts at cycle 1
//   din         - information bit, used in the cycles where vdin is 1
//   vdin        - 1 in the K information cycles of each frame, 0 in the parity cycles
//   dout        - the S2 output, registered: the bit of cycle j appears in cycle j+1
// Timing: din -> dout is one register; vdin is decoded from the frame counter.
//
// The LFSR, the switches S1/S2 and the registered output follow the
// encoding circuit and its synthesized netlist; the counter-based control,
// the meaning given to vdin and the reset behaviour are this design's own.
module bch_encoder #(
  parameter int unsigned  N = 15,
  parameter int unsigned  K = 11,
  parameter logic [N-K:0] G = 5'b1_0011
) (
  input  logic clk,
  input  logic reset,
  input  logic din,
  output logic vdin,
  output logic dout
);
  logic info_phase;
  logic frame_start;
  logic parity_bit;
  logic din_gated;
  logic s2_out;

  bch_ctrl #(.N(N), .K(K)) u_ctrl (
    .clk        (clk),
    .reset      (reset),
    .info_phase (info_phase),
    .frame_start(frame_start)
  );

  // Information input reaches the LFSR and S2 only in the information phase.
  assign din_gated = din & info_phase;

  bch_lfsr #(.R(N - K), .G(G)) u_lfsr (
    .clk       (clk),
    .reset     (reset),
    .s1_on     (info_phase),
    .din       (din_gated),
    .parity_bit(parity_bit)
  );

  // Switch S2: position 2 = information bit, position 1 = parity bit.
  assign s2_out = info_phase ? din_gated : parity_bit;

  // Output flip-flop; its input is held at 0 while reset is asserted.
  always_ff @(posedge clk) dout <= s2_out & ~reset;

  assign vdin = info_phase;

  // Every frame has exactly K information cycles followed by the parity phase.
  a_frame_len: assert property (@(posedge clk) disable iff (reset)
                                frame_start |-> ##(K) !info_phase);

endmodule
