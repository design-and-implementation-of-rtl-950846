// bch_enc_harness: stimulus and checker for one serial (15,K) encoder.
//
// It resets the encoder, then sends NFRAMES codewords back to back: an
// optional fixed example word first, then all-zero, all-one and random
// information words. At every falling clock edge it checks vdin against the
// cycle of the frame (1 for cycles 0..K-1) and dout against the reference
// codeword bit of the previous cycle (dout is registered), so the 15-cycle
// period and the one-cycle latency are checked on every bit. During the
// parity cycles din carries random junk, which must not reach dout. In frame
// RST_FRAME a reset is applied after RST_CYCLE cycles, and the encoder must
// start a clean frame. Every received codeword is also checked to be divisible
// by g(x). Counters record how often each mechanism was exercised.
module bch_enc_harness #(
  parameter int unsigned K         = 11,
  parameter logic [10:0] G         = 11'b000_0001_0011,
  parameter int unsigned NFRAMES   = 40,
  parameter int unsigned RST_FRAME = 5,
  parameter int unsigned RST_CYCLE = 9,
  parameter bit          EX_EN     = 1'b0,
  parameter logic [14:0] EX_INFO   = '0
) (
  input  logic clk,
  output logic reset,
  output logic din,
  input  logic vdin,
  input  logic dout,
  output int   checks,
  output int   failures,
  output int   n_info,       // information cycles seen
  output int   n_parity,     // parity cycles seen
  output int   n_b2b,        // frames that started right after a full frame
  output int   n_midreset,   // resets applied in the middle of a frame
  output int   n_junk,       // parity cycles with din = 1 that had to be ignored
  output int   n_par_ones,   // parity bits equal to 1
  output logic [14:0] first_cw, // first codeword received
  output logic done
);
  import bch_ref_pkg::*;

  logic        prev_valid;
  logic        prev_exp;
  logic [14:0] rx;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("K=%0d FAIL %s at %0t", K, what, $time);
    end
  endtask

  // One cycle of a frame: checks, then drive, then wait for the next falling edge.
  task automatic cycle(input int c, input logic [14:0] cw, input logic [14:0] info);
    chk(vdin == (c < int'(K)), $sformatf("vdin in cycle %0d", c));
    if (prev_valid) chk(dout == prev_exp, $sformatf("dout for cycle %0d", c - 1));
    if (c > 0) rx[15 - c] = dout;
    if (c < int'(K)) begin
      din = info[K - 1 - c];
      n_info++;
    end else begin
      din = 1'($urandom);
      n_parity++;
      if (din) n_junk++;
      if (cw[14 - c]) n_par_ones++;
    end
    prev_exp   = cw[14 - c];
    prev_valid = 1'b1;
    @(negedge clk);
  endtask

  task automatic do_reset(input int ncyc);
    reset = 1'b1;
    din   = 1'($urandom);
    repeat (ncyc) @(negedge clk);
    reset      = 1'b0;
    prev_valid = 1'b1;   // dout was forced to 0 by the reset
    prev_exp   = 1'b0;
  endtask

  initial begin
    logic [14:0] info, cw;
    logic        full_before;
    int          nwords;
    checks = 0; failures = 0; n_info = 0; n_parity = 0; n_b2b = 0;
    n_midreset = 0; n_junk = 0; n_par_ones = 0; done = 1'b0;
    prev_valid = 1'b0; prev_exp = 1'b0; rx = '0; first_cw = '0; nwords = 0;
    din = 1'b0;
    @(negedge clk);
    do_reset(3);
    full_before = 1'b0;
    for (int f = 0; f < int'(NFRAMES); f++) begin
      if (EX_EN && f == 0) info = EX_INFO;
      else if (f <= 1)     info = '0;
      else if (f == 2)     info = '1;
      else                 info = 15'($urandom);
      info &= (15'd1 << K) - 15'd1;
      cw = ref_codeword(info, K, G);
      if (full_before) n_b2b++;
      if (f == int'(RST_FRAME)) begin
        // Partial frame, then a reset in the middle of it.
        for (int c = 0; c < int'(RST_CYCLE); c++) cycle(c, cw, info);
        do_reset(1);
        n_midreset++;
        full_before = 1'b0;
        continue;
      end
      for (int c = 0; c < 15; c++) cycle(c, cw, info);
      full_before = 1'b1;
      // The last bit of this frame is seen in cycle 0 of the next one.
      if (f == int'(NFRAMES) - 1) begin
        chk(dout == prev_exp, "dout for last cycle");
      end
      rx[0] = dout;
      // rx holds bits of cycles 0..13 now; bit 0 (cycle 14) is read here.
      chk(rx == cw, $sformatf("received codeword %h expected %h", rx, cw));
      chk(ref_syndrome(rx, K, G) == '0, "received word is a multiple of g(x)");
      if (nwords == 0) first_cw = rx;
      nwords++;
    end
    done = 1'b1;
  end

endmodule
