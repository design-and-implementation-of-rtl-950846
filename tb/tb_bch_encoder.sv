// tb_bch_encoder: self-checking testbench of bch_encoder, the serial (15,11) BCH encoder.
//
// bch_enc_harness sends back-to-back codewords (fixed, all-zero, all-one and
// random information words, with a reset in the middle of one frame) and
// checks vdin and dout on every cycle against a long-division reference.
// The encoder is run at its default parameters, the (15,11) code.
// A watchdog ends the run with a failure if the harness does not finish.
module tb_bch_encoder;
  import bch_pkg::*;

  logic clk = 1'b0;
  logic reset, din, vdin, dout;
  int   checks, failures, n_info, n_parity, n_b2b, n_midreset, n_junk, n_par_ones;
  logic [14:0] first_cw;
  logic done;
  int   extra_checks = 0, extra_fail = 0;

  always #10 clk = ~clk;   // 20 ns clock period

  bch_encoder dut (.clk(clk), .reset(reset), .din(din), .vdin(vdin), .dout(dout));

  bch_enc_harness #(.K(11), .G(11'(5'b1_0011)), .NFRAMES(60), .EX_EN(1'b0), .EX_INFO('0)) h (
    .clk(clk), .reset(reset), .din(din), .vdin(vdin), .dout(dout),
    .checks(checks), .failures(failures), .n_info(n_info), .n_parity(n_parity),
    .n_b2b(n_b2b), .n_midreset(n_midreset), .n_junk(n_junk), .n_par_ones(n_par_ones),
    .first_cw(first_cw), .done(done));

  task automatic report();
    int c = checks + extra_checks + 6;
    int f = failures + extra_fail;
    if (n_info == 0)     begin f++; $display("never exercised: information phase"); end
    if (n_parity == 0)   begin f++; $display("never exercised: parity phase"); end
    if (n_b2b == 0)      begin f++; $display("never exercised: back-to-back frames"); end
    if (n_midreset == 0) begin f++; $display("never exercised: reset inside a frame"); end
    if (n_junk == 0)     begin f++; $display("never exercised: din ignored in parity phase"); end
    if (n_par_ones == 0) begin f++; $display("never exercised: non-zero parity"); end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  endtask

  initial begin
    @(posedge clk);
    wait (done);
        report();
  end

  initial begin
    repeat (3000) @(posedge clk);
    extra_fail++;
    $display("watchdog: harness did not finish");
    report();
  end
endmodule
