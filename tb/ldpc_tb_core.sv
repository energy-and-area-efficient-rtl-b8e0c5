// ldpc_tb_core: stimulus generator and checker for ldpc_edram_decoder, shared
// by the reduced-size and the full-size end-to-end testbenches. It is
// instantiated next to the decoder (not around it), so the decoder keeps
// whatever parameters the enclosing testbench gives it; the core must be
// given the same values.
//
// It generates clock and reset, sends NCW codewords and checks them:
//   codeword 0 : the all-zero codeword sent with LLR +12, a few bits flipped
//                to -12 by the "channel"; the output must be all zero;
//   codeword 1+: random LLRs over the whole 6-bit range (with -32, which the
//                decoder saturates), the hardest case for bit-exactness.
// Every hard decision is compared with a reference flooding offset min-sum decoder
// written here over the explicit edge list of the parity check matrix (6-bit
// saturated messages, same as the hardware), and the following are checked:
// cycles from the last input beat to done = 1 + ITER*(2P+2); P output beats
// per codeword; wordline activations and write-backs equal to the number of
// runs of accesses to one wordline that the schedule implies; no retention
// error. Load beats are sent with random gaps (input stalls). Each mechanism
// (stall, wrap-split wordline, page hit, corrected bit error, back-to-back
// codewords) is counted, and one that never occurs counts as a failure.
// With AUX_EXPECT set, aux_retention_err comes from a second decoder whose
// retention time is shorter than one iteration, and it must have risen by
// the end: the retention model has to catch a schedule that needs refresh.
module ldpc_tb_core
  import ldpc_pkg::*;
#(
  parameter int unsigned P        = P_DEF,
  parameter int unsigned MB       = MB_DEF,
  parameter int unsigned NB       = NB_DEF,
  parameter int unsigned PERM     = PERM_DEF,
  parameter int unsigned ITER     = ITER_DEF,
  parameter int unsigned WL_MSGS  = WL_MSGS_DEF,
  parameter int unsigned NCW      = 2,
  parameter int unsigned FLIP_PM  = 20,     // channel flips in codeword 0, per mille
  parameter bit          AUX_EXPECT = 1'b0, // aux_retention_err must rise
  localparam int unsigned AW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned IW = (ITER > 1) ? $clog2(ITER) : 1
) (
  output logic          clk,
  output logic          rst_n,
  output logic          in_valid,
  input  logic          in_ready,
  output msg_t          in_llr [NB],
  input  logic          out_valid,
  input  logic [AW-1:0] out_col,
  input  logic [NB-1:0] out_bits,
  input  logic          done,
  input  logic [IW-1:0] iteration,
  input  logic [31:0]   act_count,
  input  logic [31:0]   wb_count,
  input  logic          retention_err,
  input  logic          aux_retention_err   // from a decoder run too long without refresh
);

  localparam int unsigned N     = NB * P;
  localparam int unsigned M     = MB * P;
  localparam int unsigned NE    = MB * NB * PERM * P;
  localparam int unsigned ROWS  = (P + WL_MSGS - 1) / WL_MSGS;
  localparam int unsigned NMSG  = MB * NB * PERM;
  localparam int unsigned LAT   = 1 + ITER * (2 * P + 2);

  int checks = 0, failures = 0;
  int n_stall = 0, n_split = 0, n_hit = 0, n_corrected = 0, n_b2b = 0;
  longint cycle = 0;

  // Reference decoder state.
  int llr     [N];
  int e_col   [NE];
  int v2c     [NE];
  int c2v     [NE];
  bit ref_hard [N];
  int tot      [N];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  function automatic int clamp(input int v);
    return (v > 31) ? 31 : (v < -31) ? -31 : v;
  endfunction

  // Edge e = ((i*NB + j)*PERM + k)*P + r joins check i*P + r to bit e_col[e].
  task automatic build_graph();
    for (int i = 0; i < int'(MB); i++)
      for (int j = 0; j < int'(NB); j++)
        for (int k = 0; k < int'(PERM); k++)
          for (int r = 0; r < int'(P); r++)
            e_col[((i*NB + j)*PERM + k)*P + r] =
              j*P + int'((r + circ_shift(i, j, k, P)) % P);
  endtask

  task automatic ref_decode();
    int deg_r = NB * PERM;
    for (int e = 0; e < int'(NE); e++) v2c[e] = clamp(llr[e_col[e]]);
    for (int it = 0; it < int'(ITER); it++) begin
      // check nodes
      for (int i = 0; i < int'(MB); i++)
        for (int r = 0; r < int'(P); r++) begin
          int m1 = 99, m2 = 99, nmin = 0;
          bit par = 0;
          for (int t = 0; t < deg_r; t++) begin
            int e = (i*NB*PERM + t)*P + r;
            int a = (v2c[e] < 0) ? -v2c[e] : v2c[e];
            par ^= (v2c[e] < 0);
            if (a < m1) begin m2 = m1; m1 = a; nmin = 1; end
            else if (a == m1) begin m2 = a; nmin++; end
            else if (a < m2) m2 = a;
          end
          for (int t = 0; t < deg_r; t++) begin
            int e = (i*NB*PERM + t)*P + r;
            int a = (v2c[e] < 0) ? -v2c[e] : v2c[e];
            int mag = (a == m1 && nmin == 1) ? m2 : m1;
            mag = (mag > 1) ? mag - 1 : 0;     // offset min-sum, offset 1
            c2v[e] = (par ^ (v2c[e] < 0)) ? -mag : mag;
          end
        end
      // variable nodes: sum per bit, then extrinsic
      begin
        for (int c = 0; c < int'(N); c++) tot[c] = clamp(llr[c]);
        for (int e = 0; e < int'(NE); e++) tot[e_col[e]] += c2v[e];
        for (int e = 0; e < int'(NE); e++) v2c[e] = clamp(tot[e_col[e]] - c2v[e]);
        for (int c = 0; c < int'(N); c++) ref_hard[c] = (tot[c] < 0);
      end
    end
  endtask

  // Wordline activations implied by one sweep of P addresses starting at s.
  function automatic int runs_of(input int s);
    int prev = -1, n = 0;
    for (int t = 0; t < int'(P); t++) begin
      int row = ((s + t) % int'(P)) / int'(WL_MSGS);
      if (row != prev) n++;
      prev = row;
    end
    return n;
  endfunction

  function automatic longint expected_acts_per_cw();
    longint a = longint'(NMSG + NB) * ROWS;               // load
    longint chk = 0;
    for (int i = 0; i < int'(MB); i++)
      for (int j = 0; j < int'(NB); j++)
        for (int k = 0; k < int'(PERM); k++)
          chk += runs_of(int'(circ_shift(i, j, k, P)));
    a += longint'(ITER) * (chk + longint'(NMSG + NB) * ROWS);
    return a;
  endfunction

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (NCW * (3 * P + ITER * (2 * P + 2)) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker.
  int  out_beats = 0;
  bit  cw_dec_zero;
  int  n_ones;
  always @(posedge clk) if (rst_n && out_valid) begin
    out_beats++;
    for (int j = 0; j < int'(NB); j++) begin
      int c;
      c = j * int'(P) + int'(out_col);
      checks++;
      if (out_bits[j] !== ref_hard[c]) begin
        failures++;
        if (failures < 20)
          $display("FAIL bit %0d: decoder %0b reference %0b", c, out_bits[j], ref_hard[c]);
      end
      if (out_bits[j]) begin
        cw_dec_zero = 1'b0;
        n_ones++;
      end
    end
  end

  initial begin
    longint exp_acts, t_last, a0, w0;
    rst_n = 1'b0; in_valid = 1'b0;
    for (int j = 0; j < int'(NB); j++) in_llr[j] = '0;
    build_graph();
    for (int s = 0; s < int'(NMSG); s++) begin
      int i, j, k;
      i = s / int'(NB*PERM); j = (s / int'(PERM)) % int'(NB); k = s % int'(PERM);
      if (circ_shift(i, j, k, P) % WL_MSGS != 0) n_split++;
    end
    exp_acts = expected_acts_per_cw();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int cw = 0; cw < int'(NCW); cw++) begin
      int flips;
      longint acc, acts_cw;
      flips = 0;
      // channel values
      for (int c = 0; c < int'(N); c++) begin
        if (cw == 0) begin
          llr[c] = ($urandom_range(999) < FLIP_PM) ? -12 : 12;
          if (llr[c] < 0) flips++;
        end else begin
          llr[c] = int'($urandom_range(63)) - 32;
        end
      end
      ref_decode();
      cw_dec_zero = 1'b1;
      n_ones      = 0;
      out_beats   = 0;
      a0 = act_count; w0 = wb_count;
      check(in_ready == 1'b1, "decoder ready for a new codeword");
      if (cw > 0) n_b2b++;

      // load, with random stalls
      for (int a = 0; a < int'(P); a++) begin
        if ($urandom_range(7) == 0) begin
          in_valid = 1'b0;
          n_stall++;
          repeat (1 + $urandom_range(2)) @(posedge clk);
          #1;
        end
        in_valid = 1'b1;
        for (int j = 0; j < int'(NB); j++) in_llr[j] = msg_t'(llr[j * int'(P) + a]);
        check(in_ready == 1'b1, "in_ready during load");
        @(posedge clk);
        t_last = cycle;
        #1;
      end
      in_valid = 1'b0;
      check(in_ready == 1'b0, "in_ready drops after the last beat");

      // wait for done and check latency
      while (done !== 1'b1) begin
        @(posedge clk);
        #1;
      end
      check(cycle - t_last == longint'(LAT),
            $sformatf("latency %0d cycles, expected %0d", cycle - t_last, LAT));
      @(posedge clk); #1;
      check(out_beats == int'(P), $sformatf("%0d output beats, expected %0d", out_beats, P));
      check(longint'(act_count) - a0 == exp_acts,
            $sformatf("activations %0d, expected %0d", longint'(act_count) - a0, exp_acts));
      check(longint'(wb_count) - w0 == exp_acts,
            $sformatf("write-backs %0d, expected %0d", longint'(wb_count) - w0, exp_acts));
      check(retention_err == 1'b0, "no retention error without refresh");
      if (cw == 0) begin
        check(cw_dec_zero, "noisy all-zero codeword decoded to all zero");
        if (cw_dec_zero) n_corrected += flips;
        $display("codeword 0: %0d channel errors, %0d left after decoding", flips, n_ones);
      end
      // accesses: load writes, check read-modify-writes, variable
      // read-modify-writes plus input reads; a conventional controller
      // activates once per read and once per write.
      acc = longint'(NMSG + NB) * P + longint'(ITER) * (longint'(2 * NMSG + NB) * P);
      acts_cw = longint'(act_count) - a0;
      n_hit += int'(acc - acts_cw);
      $display("codeword %0d: %0d wordline activations for %0d message accesses (conventional control: %0d)",
               cw, acts_cw, acc,
               longint'(NMSG + NB) * P + longint'(ITER) * (longint'(4 * NMSG + NB) * P));
    end

    $display("mechanisms: load stalls=%0d wrap-split blocks=%0d page hits~%0d corrected bits=%0d back-to-back=%0d",
             n_stall, n_split, n_hit, n_corrected, n_b2b);
    check(n_stall > 0, "input stall exercised");
    check(n_split > 0, "wrap-split wordline exercised");
    check(n_hit > 0, "page-mode hits exercised");
    check(n_corrected > 0, "channel errors corrected");
    check(NCW < 2 || n_b2b > 0, "back-to-back codewords exercised");
    if (AUX_EXPECT) begin
      $display("retention violation detected in the short-retention decoder: %0b", aux_retention_err);
      check(aux_retention_err == 1'b1, "retention violation detected when retention < iteration");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
