// tb_bch15_top: end-to-end testbench of bch15_top, all three encoders at once.
//
// One bch_enc_harness per encoder sends back-to-back codewords and checks
// vdin and dout on every cycle against a long-division reference. The three
// harnesses follow the same schedule (same frame length, same reset points),
// so the shared reset is the OR of their identical reset requests. The first
// word of the (15,11) encoder is the worked example: information 01011001001
// must be followed by parity 1100. The first word of the (15,5) encoder is
// the information 01100 (in the order sent), whose parity is 1000111101. Every mechanism of the encoders must have
// happened at least once per code: information phase (S1 closed, S2 passing
// din), parity phase (S1 open, S2 on the LFSR), back-to-back frames, din
// ignored during parity, a reset inside a frame; otherwise a failure is counted.
// A watchdog ends the run with a failure if the harnesses do not finish.
module tb_bch15_top;
  import bch_pkg::*;

  logic clk = 1'b0;
  logic reset;
  logic [2:0] rst_req, din, vdin, dout, done;
  int   checks[3], failures[3], n_info[3], n_parity[3], n_b2b[3], n_midreset[3];
  int   n_junk[3], n_par_ones[3];
  logic [14:0] first_cw[3];
  int   extra_checks = 0, extra_fail = 0;

  always #10 clk = ~clk;   // 20 ns clock period
  assign reset = |rst_req;

  bch15_top dut (
    .clk(clk), .reset(reset),
    .din_t1(din[0]), .vdin_t1(vdin[0]), .dout_t1(dout[0]),
    .din_t2(din[1]), .vdin_t2(vdin[1]), .dout_t2(dout[1]),
    .din_t3(din[2]), .vdin_t3(vdin[2]), .dout_t3(dout[2]));

  bch_enc_harness #(.K(K_T1), .G(11'(G_T1)), .NFRAMES(200), .EX_EN(1'b1), .EX_INFO(15'b01011001001)) h1 (
    .clk(clk), .reset(rst_req[0]), .din(din[0]), .vdin(vdin[0]), .dout(dout[0]),
    .checks(checks[0]), .failures(failures[0]), .n_info(n_info[0]), .n_parity(n_parity[0]),
    .n_b2b(n_b2b[0]), .n_midreset(n_midreset[0]), .n_junk(n_junk[0]), .n_par_ones(n_par_ones[0]),
    .first_cw(first_cw[0]), .done(done[0]));
  bch_enc_harness #(.K(K_T2), .G(11'(G_T2)), .NFRAMES(200)) h2 (
    .clk(clk), .reset(rst_req[1]), .din(din[1]), .vdin(vdin[1]), .dout(dout[1]),
    .checks(checks[1]), .failures(failures[1]), .n_info(n_info[1]), .n_parity(n_parity[1]),
    .n_b2b(n_b2b[1]), .n_midreset(n_midreset[1]), .n_junk(n_junk[1]), .n_par_ones(n_par_ones[1]),
    .first_cw(first_cw[1]), .done(done[1]));
  bch_enc_harness #(.K(K_T3), .G(11'(G_T3)), .NFRAMES(200), .EX_EN(1'b1), .EX_INFO(15'b01100)) h3 (
    .clk(clk), .reset(rst_req[2]), .din(din[2]), .vdin(vdin[2]), .dout(dout[2]),
    .checks(checks[2]), .failures(failures[2]), .n_info(n_info[2]), .n_parity(n_parity[2]),
    .n_b2b(n_b2b[2]), .n_midreset(n_midreset[2]), .n_junk(n_junk[2]), .n_par_ones(n_par_ones[2]),
    .first_cw(first_cw[2]), .done(done[2]));

  // The three resets requests must coincide (identical schedules).
  always @(negedge clk) begin
    extra_checks++;
    if (!(rst_req == 3'b000 || rst_req == 3'b111)) begin
      extra_fail++;
      $display("reset requests diverged: %b", rst_req);
    end
  end

  task automatic report();
    int c = extra_checks;
    int f = extra_fail;
    for (int i = 0; i < 3; i++) begin
      c += checks[i] + 6;
      f += failures[i];
      if (n_info[i] == 0)     begin f++; $display("code %0d never exercised: information phase", i + 1); end
      if (n_parity[i] == 0)   begin f++; $display("code %0d never exercised: parity phase", i + 1); end
      if (n_b2b[i] == 0)      begin f++; $display("code %0d never exercised: back-to-back frames", i + 1); end
      if (n_midreset[i] == 0) begin f++; $display("code %0d never exercised: reset inside a frame", i + 1); end
      if (n_junk[i] == 0)     begin f++; $display("code %0d never exercised: din ignored in parity", i + 1); end
      if (n_par_ones[i] == 0) begin f++; $display("code %0d never exercised: non-zero parity", i + 1); end
      $display("code t=%0d: info cycles %0d, parity cycles %0d, back-to-back frames %0d, mid-frame resets %0d, ignored din %0d",
               i + 1, n_info[i], n_parity[i], n_b2b[i], n_midreset[i], n_junk[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  endtask

  initial begin
    @(posedge clk);
    wait (&done);
    extra_checks++;
    if (first_cw[0] !== 15'b01011001001_1100) begin
      extra_fail++;
      $display("worked example (15,11): got %b", first_cw[0]);
    end
    extra_checks++;
    if (first_cw[2] !== 15'b01100_1000111101) begin
      extra_fail++;
      $display("worked example (15,5): got %b", first_cw[2]);
    end
    report();
  end

  initial begin
    repeat (4000) @(posedge clk);
    extra_fail++;
    $display("watchdog: harnesses did not finish");
    report();
  end
endmodule
