// tb_bch_ctrl: self-checking testbench of bch_ctrl, the frame counter.
//
// Three instances with K = 11, 7 and 5 (N = 15) run from a common reset. A
// cycle counter kept by the testbench predicts, for every cycle, info_phase
// (1 in cycles 0..K-1 of a frame) and frame_start (1 in cycle 0), so the
// 15-cycle frame period is checked over many frames. A reset in the middle of
// a frame must restart the frame at cycle 0.
// A watchdog ends the run with a failure if it hangs.
module tb_bch_ctrl;
  import bch_pkg::*;

  logic       clk = 1'b0;
  logic       reset;
  logic [2:0] info, fs;
  int         checks = 0, failures = 0;
  int         kk[3] = '{K_T1, K_T2, K_T3};

  always #10 clk = ~clk;

  bch_ctrl #(.N(BCH_N), .K(K_T1)) u0 (.clk(clk), .reset(reset), .info_phase(info[0]), .frame_start(fs[0]));
  bch_ctrl #(.N(BCH_N), .K(K_T2)) u1 (.clk(clk), .reset(reset), .info_phase(info[1]), .frame_start(fs[1]));
  bch_ctrl #(.N(BCH_N), .K(K_T3)) u2 (.clk(clk), .reset(reset), .info_phase(info[2]), .frame_start(fs[2]));

  task automatic finish_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  task automatic check_cycle(int c);
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (info[i] !== (c < kk[i]) || fs[i] !== (c == 0)) begin
        failures++;
        if (failures < 10) $display("K=%0d cycle %0d: info_phase=%b frame_start=%b",
                                    kk[i], c, info[i], fs[i]);
      end
    end
  endtask

  initial begin
    reset = 1'b1;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    for (int cyc = 0; cyc < 15 * 20; cyc++) begin
      check_cycle(cyc % 15);
      @(negedge clk);
    end
    // Reset in the middle of a frame.
    repeat (6) @(negedge clk);
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    for (int cyc = 0; cyc < 15 * 4; cyc++) begin
      check_cycle(cyc % 15);
      @(negedge clk);
    end
    finish_run();
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_run();
  end
endmodule
