// tb_bch_lfsr: self-checking testbench of bch_lfsr, the division LFSR.
//
// Three instances, one per code: (R=4, 1+x+x^4), (R=8, 1+x^4+x^6+x^7+x^8)
// and (R=10, 1+x+x^2+x^4+x^5+x^8+x^10). For each, information words are fed
// with S1 closed for k = 15-R cycles (highest-degree bit first), then S1 is
// opened for R cycles while parity_bit is compared, cycle by cycle, with the
// remainder x^R i(x) mod g(x) from long division (highest degree first). Words
// follow each other without a reset, so the register must have emptied itself
// during the shift-out. Random din during the shift-out must not matter.
// A watchdog ends the run with a failure if it hangs.
module tb_bch_lfsr;
  import bch_pkg::*;
  import bch_ref_pkg::*;

  logic       clk = 1'b0;
  logic       reset;
  logic [2:0] s1_on, din, pbit;
  int         checks = 0, failures = 0;

  always #10 clk = ~clk;

  bch_lfsr #(.R(BCH_N - K_T1), .G(G_T1)) u0 (.clk(clk), .reset(reset), .s1_on(s1_on[0]), .din(din[0]), .parity_bit(pbit[0]));
  bch_lfsr #(.R(BCH_N - K_T2), .G(G_T2)) u1 (.clk(clk), .reset(reset), .s1_on(s1_on[1]), .din(din[1]), .parity_bit(pbit[1]));
  bch_lfsr #(.R(BCH_N - K_T3), .G(G_T3)) u2 (.clk(clk), .reset(reset), .s1_on(s1_on[2]), .din(din[2]), .parity_bit(pbit[2]));

  function automatic int unsigned k_of(int i);
    return (i == 0) ? K_T1 : (i == 1) ? K_T2 : K_T3;
  endfunction

  function automatic logic [10:0] g_of(int i);
    return (i == 0) ? 11'(G_T1) : (i == 1) ? 11'(G_T2) : 11'(G_T3);
  endfunction

  task automatic finish_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    logic [14:0] info, cw;
    int unsigned k, r;
    reset = 1'b1; s1_on = '0; din = '0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 3; i++) begin
      k = k_of(i);
      r = 15 - k;
      for (int w = 0; w < 40; w++) begin
        info = (w == 0) ? 15'h7fff : 15'($urandom);
        info &= (15'd1 << k) - 15'd1;
        cw = ref_codeword(info, k, g_of(i));
        for (int c = 0; c < int'(k); c++) begin
          s1_on[i] = 1'b1;
          din[i]   = info[k - 1 - c];
          @(negedge clk);
        end
        for (int c = 0; c < int'(r); c++) begin
          s1_on[i] = 1'b0;
          din[i]   = 1'($urandom);
          checks++;
          if (pbit[i] !== cw[r - 1 - c]) begin
            failures++;
            if (failures < 10) $display("R=%0d word %0d parity bit %0d: got %b expected %b",
                                        r, w, c, pbit[i], cw[r - 1 - c]);
          end
          @(negedge clk);
        end
      end
      s1_on[i] = 1'b0;
    end
    finish_run();
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_run();
  end
endmodule
