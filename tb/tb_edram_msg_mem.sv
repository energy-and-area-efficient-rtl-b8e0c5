// tb_edram_msg_mem: self-checking test of one eDRAM memory block with its
// interleaved page-mode controller, at a reduced size (100 messages, 7 per
// wordline, so the last of the 15 wordlines is only partly used, and a
// retention limit of 300 cycles).
//
// A write-only sweep loads the block; read-modify-write sweeps then start at
// different offsets and wrap around, as the check phase of the decoder does,
// some of them with idle gaps. Every read is compared with a reference array,
// and the number of wordline activations and write-backs is compared with
// the number of runs of consecutive accesses to one wordline (one activation
// per run, instead of two per access in a conventional controller). Finally
// the block is left idle beyond the retention limit, and a read must raise
// retention_err.
module tb_edram_msg_mem;
  import ldpc_pkg::*;

  localparam int unsigned DEPTH = 100;
  localparam int unsigned COLS  = 7;
  localparam int unsigned RET   = 300;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic          clk = 0, rst_n = 0;
  logic          re = 0, we = 0, flush = 0;
  logic [AW-1:0] addr = '0;
  msg_t          wdata = '0, rdata;
  logic          act_pulse, wb_pulse, retention_err;

  int checks = 0, failures = 0;
  int acts = 0, wbs = 0, accesses = 0;
  int refmem [DEPTH];

  edram_msg_mem #(.DEPTH(DEPTH), .COLS(COLS), .RETENTION_CYCLES(RET)) dut (
    .clk, .rst_n, .re, .we, .addr, .wdata, .rdata, .flush,
    .act_pulse, .wb_pulse, .retention_err
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    acts += int'(act_pulse);
    wbs  += int'(wb_pulse);
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic idle(input int n);
    re = 0; we = 0; flush = 0;
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic do_flush();
    re = 0; we = 0; flush = 1;
    @(posedge clk); #1;
    flush = 0;
  endtask

  // One sweep over all addresses starting at start; returns expected number
  // of wordline activations (runs of one wordline).
  task automatic sweep(input int start, input bit rd, input int gap_rate, output int runs);
    int prev_row = -1;
    runs = 0;
    for (int n = 0; n < int'(DEPTH); n++) begin
      int a, v;
      a = (start + n) % int'(DEPTH);
      if (gap_rate > 0 && $urandom_range(gap_rate - 1) == 0) idle(1 + $urandom_range(3));
      if (a / int'(COLS) != prev_row) runs++;
      prev_row = a / int'(COLS);
      v = int'($urandom_range(62)) - 31;
      re = rd; we = 1; addr = AW'(a); wdata = msg_t'(v);
      #1;
      if (rd) check(int'(rdata) == refmem[a], $sformatf("read addr %0d got %0d exp %0d", a, rdata, refmem[a]));
      @(posedge clk); #1;
      refmem[a] = v;
      accesses++;
    end
    re = 0; we = 0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int runs, a0, w0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // Load sweep, write only.
    a0 = acts; w0 = wbs;
    sweep(0, 0, 0, runs);
    do_flush();
    check(acts - a0 == runs && runs == 15, $sformatf("load activations %0d exp %0d", acts - a0, runs));
    check(wbs - w0 == runs, $sformatf("load write-backs %0d exp %0d", wbs - w0, runs));

    // Read-modify-write sweeps at several offsets.
    for (int s = 0; s < 12; s++) begin
      int start;
      start = (s * 37 + 3) % int'(DEPTH);
      a0 = acts; w0 = wbs;
      sweep(start, 1, (s % 3 == 2) ? 5 : 0, runs);
      do_flush();
      check(acts - a0 == runs, $sformatf("sweep %0d activations %0d exp %0d", s, acts - a0, runs));
      check(wbs - w0 == runs, $sformatf("sweep %0d write-backs %0d exp %0d", s, wbs - w0, runs));
      check(retention_err == 1'b0, "no retention error in regular sweeps");
    end
    $display("accesses=%0d activations=%0d (a conventional controller: %0d)", accesses, acts, 2 * accesses);

    // Leave the block idle past its retention time: a read must flag it.
    idle(int'(RET) + 20);
    re = 1; we = 0; addr = AW'(10);
    @(posedge clk); #1;
    re = 0;
    @(posedge clk); #1;
    check(retention_err == 1'b1, "retention error after idling beyond the retention time");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
