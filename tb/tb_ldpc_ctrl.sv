// tb_ldpc_ctrl: self-checking test of the decoder schedule (P = 20, 3
// iterations). A codeword is loaded with input stalls, then the phase
// sequence is followed cycle by cycle: P LOAD beats, FLUSH, and per iteration
// P CHECK cycles with the row index counting 0..P-1, FLUSH, P VAR cycles,
// FLUSH. out_valid must be high exactly in the last VAR phase, done exactly
// once at its closing FLUSH, 1 + ITER*(2P+2) cycles after the last beat.
// Two codewords are run back to back.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;

  localparam int unsigned P = 20, ITER = 3;

  logic       clk = 0, rst_n = 0, in_valid = 0;
  logic       in_ready, access, flush, out_valid, done;
  phase_e     phase;
  logic [4:0] cnt;
  logic [1:0] iter;

  int checks = 0, failures = 0;

  ldpc_ctrl #(.P(P), .ITER(ITER)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .phase, .cnt, .iter,
    .access, .flush, .out_valid, .done
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Check the state of this cycle, then advance one clock.
  task automatic expect_cycle(input phase_e ph, input int c, input int it,
                              input bit ov, input bit dn);
    #1;
    check(phase == ph, $sformatf("phase %s expected %s", phase.name(), ph.name()));
    if (ph != PH_FLUSH) check(int'(cnt) == c, $sformatf("cnt %0d expected %0d", cnt, c));
    check(int'(iter) == it, $sformatf("iter %0d expected %0d", iter, it));
    check(out_valid == ov && done == dn && flush == (ph == PH_FLUSH), "out_valid / done / flush");
    check(access == (ph == PH_CHECK || ph == PH_VAR || (ph == PH_LOAD && in_valid)), "access");
    @(posedge clk);
    #1;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, cyc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cw = 0; cw < 2; cw++) begin
      for (int a = 0; a < int'(P); a++) begin
        if (a % 7 == 3) begin
          in_valid = 0;
          expect_cycle(PH_LOAD, a, 0, 0, 0);     // stall: cnt holds
        end
        in_valid = 1;
        #1 check(in_ready == 1'b1, "in_ready in LOAD");
        expect_cycle(PH_LOAD, a, 0, 0, 0);
      end
      in_valid = 0;
      cyc = 0;
      expect_cycle(PH_FLUSH, 0, 0, 0, 0); cyc++;
      for (int it = 0; it < int'(ITER); it++) begin
        for (int r = 0; r < int'(P); r++) begin expect_cycle(PH_CHECK, r, it, 0, 0); cyc++; end
        expect_cycle(PH_FLUSH, 0, it, 0, 0); cyc++;
        for (int c = 0; c < int'(P); c++) begin
          expect_cycle(PH_VAR, c, it, it == int'(ITER) - 1, 0); cyc++;
        end
        expect_cycle(PH_FLUSH, 0, (it + 1) % int'(ITER), 0, it == int'(ITER) - 1); cyc++;
      end
      check(cyc == 1 + int'(ITER) * (2 * int'(P) + 2), $sformatf("latency %0d", cyc));
      #1 check(phase == PH_LOAD && in_ready, "back in LOAD after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
