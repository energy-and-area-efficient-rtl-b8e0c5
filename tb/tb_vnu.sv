// tb_vnu: self-checking test of the variable node unit at its full degree
// of 4. Random LLRs and check messages, including saturating ones, are
// applied; each outgoing message is compared with the clamped sum of the LLR
// and the three other incoming messages, and the hard decision with the sign
// of the full sum.
module tb_vnu;
  import ldpc_pkg::*;

  localparam int unsigned DEG = 4;

  msg_t llr;
  msg_t c2v [DEG];
  msg_t v2c [DEG];
  logic hard_bit;
  int   checks = 0, failures = 0;

  vnu #(.DEG(DEG)) dut (.llr, .c2v, .v2c, .hard_bit);

  function automatic int clamp31(input int v);
    return (v > 31) ? 31 : (v < -31) ? -31 : v;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int tot;
      llr = msg_t'(int'($urandom_range(62)) - 31);
      for (int k = 0; k < int'(DEG); k++) c2v[k] = msg_t'(int'($urandom_range(62)) - 31);
      #1;
      tot = int'(llr);
      for (int k = 0; k < int'(DEG); k++) tot += int'(c2v[k]);
      for (int k = 0; k < int'(DEG); k++) begin
        checks++;
        if (int'(v2c[k]) != clamp31(tot - int'(c2v[k]))) begin
          failures++;
          if (failures < 10) $display("mismatch t=%0d k=%0d got=%0d exp=%0d", t, k, v2c[k], clamp31(tot - int'(c2v[k])));
        end
      end
      checks++;
      if (hard_bit !== (tot < 0)) begin
        failures++;
        if (failures < 10) $display("hard mismatch t=%0d tot=%0d got=%0b", t, tot, hard_bit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
