// bch_ctrl: frame control of a serial (n,k) systematic encoder.
//
// A modulo-N counter walks through the N clock cycles of one codeword. In
// cycles 1..K (count 0..K-1) it reports the information phase, which closes
// switch S1 (LFSR feedback on) and sets switch S2 to pass the information bit;
// in cycles K+1..N it reports the parity phase (S1 open, S2 on the LFSR
// output). Frames follow each other without idle cycles, so one codeword
// takes exactly N cycles.
//
// Interface: clk, reset (synchronous, active high, returns to cycle 1),
// info_phase (1 in cycles 1..K), frame_start (1 in cycle 1).
// Timing: both outputs are decoded from the counter register, no input paths.
//
// The switch timing is the one the encoder is defined by; the counter that
// produces it, its encoding and the reset style are this design's choice.
module bch_ctrl #(
  parameter int unsigned N = 15,
  parameter int unsigned K = 11
) (
  input  logic clk,
  input  logic reset,
  output logic info_phase,
  output logic frame_start
);
  import bch_pkg::*;

  localparam int unsigned CW = $clog2(N);

  logic [CW-1:0] count;
  phase_e        phase;

  always_ff @(posedge clk) begin
    if (reset)                        count <= '0;
    else if (count == CW'(N - 1))     count <= '0;
    else                              count <= count + 1'b1;
  end

  always_comb begin
    phase       = (count < CW'(K)) ? PH_INFO : PH_PARITY;
    info_phase  = (phase == PH_INFO);
    frame_start = (count == '0);
  end

  initial begin
    assert (K > 0 && K < N) else $error("bch_ctrl: need 0 < K < N");
  end

  // The counter never leaves 0..N-1.
  a_count_range: assert property (@(posedge clk) disable iff (reset) count < CW'(N));

endmodule
