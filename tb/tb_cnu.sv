// tb_cnu: self-checking test of the offset min-sum check node unit at its
// full degree of 64 and default offset of 1. Random messages (with forced
// ties and extreme values) are applied and every output is compared with a
// direct evaluation of the rule: for each edge, the sign product and the
// minimum magnitude taken over all other edges, less 1 but not below 0.
module tb_cnu;
  import ldpc_pkg::*;

  localparam int unsigned DEG = 64;

  msg_t v2c [DEG];
  msg_t c2v [DEG];
  int   checks = 0, failures = 0;

  cnu #(.DEG(DEG)) dut (.v2c, .c2v);

  function automatic msg_t ref_out(input int e);
    int mn = 1000;
    bit neg = 0;
    for (int k = 0; k < int'(DEG); k++) begin
      int v, a;
      v = int'(v2c[k]);
      a = (v < 0) ? -v : v;
      if (k != e && a < mn) mn = a;
      if (k != e && v < 0) neg = ~neg;
    end
    mn = (mn > 1) ? mn - 1 : 0;            // offset 1
    return neg ? msg_t'(-mn) : msg_t'(mn);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < int'(DEG); k++) begin
        int v;
        case (t % 4)
          0: v = int'($urandom_range(62)) - 31;            // full range
          1: v = int'($urandom_range(20)) + 5;             // mostly positive
          2: v = ($urandom_range(1) != 0) ? 3 : -3;        // many ties
          default: v = ($urandom_range(7) == 0) ? int'($urandom_range(4)) - 2
                                                 : int'($urandom_range(62)) - 31;
        endcase
        v2c[k] = msg_t'(v);
      end
      #1;
      for (int k = 0; k < int'(DEG); k++) begin
        msg_t exp_v;
        exp_v = ref_out(k);
        checks++;
        if (c2v[k] !== exp_v) begin
          failures++;
          if (failures < 10)
            $display("mismatch t=%0d edge=%0d got=%0d exp=%0d", t, k, c2v[k], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
