// tb_edram_bank: self-checking test of the planar eDRAM sub-array model
// (4 wordlines of 5 messages, retention limit 60 cycles).
//
// A random sequence of activations (with write-back of the open wordline),
// column reads and writes on the open wordline, and bare write-backs is
// applied, obeying the rule that a wordline is only ever open in the sense
// amplifiers. Every read is compared with a reference model holding the
// cells and the sense amplifier row separately, so a missing write-back or a
// write that goes to the cells instead of the sense amplifiers shows up.
// Then retention is tested: a wordline left alone past the limit reports an
// error when read, but not when every message is rewritten before it is read.
module tb_edram_bank;
  import ldpc_pkg::*;

  localparam int unsigned ROWS = 4, COLS = 5, RET = 60;

  logic       clk = 0, rst_n = 0;
  logic       act = 0, wb = 0, col_re = 0, col_we = 0;
  logic [1:0] act_row = '0, wb_row = '0;
  logic [2:0] col = '0;
  msg_t       col_wdata = '0, col_rdata;
  logic       retention_err;

  int checks = 0, failures = 0;
  int cells_ref [ROWS][COLS];
  int sa_ref [COLS];
  int open_row = -1;

  edram_bank #(.ROWS(ROWS), .COLS(COLS), .RETENTION_CYCLES(RET)) dut (
    .clk, .rst_n, .act, .act_row, .wb, .wb_row, .col_re, .col_we, .col,
    .col_wdata, .col_rdata, .retention_err
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic clear();
    act = 0; wb = 0; col_re = 0; col_we = 0;
  endtask

  // Open wordline r (writing back the open one) and optionally access col c.
  task automatic open(input int r, input bit rd, input bit wr, input int c, input int v);
    act = 1; act_row = 2'(r);
    wb = (open_row >= 0); wb_row = 2'((open_row >= 0) ? open_row : 0);
    col_re = rd; col_we = wr; col = 3'(c); col_wdata = msg_t'(v);
    #1;
    if (rd) check(int'(col_rdata) == ((r == open_row) ? sa_ref[c] : cells_ref[r][c]),
                  "read during activation");
    @(posedge clk); #1;
    if (open_row >= 0) cells_ref[open_row] = sa_ref;
    sa_ref = cells_ref[r];
    if (wr) sa_ref[c] = v;
    open_row = r;
    clear();
  endtask

  task automatic access(input bit rd, input bit wr, input int c, input int v);
    col_re = rd; col_we = wr; col = 3'(c); col_wdata = msg_t'(v);
    #1;
    if (rd) check(int'(col_rdata) == sa_ref[c], $sformatf("read of open row col %0d got %0d exp %0d", c, col_rdata, sa_ref[c]));
    @(posedge clk); #1;
    if (wr) sa_ref[c] = v;
    clear();
  endtask

  task automatic close();
    wb = 1; wb_row = 2'(open_row);
    @(posedge clk); #1;
    cells_ref[open_row] = sa_ref;
    open_row = -1;
    clear();
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // Fill every wordline through the sense amplifiers.
    for (int r = 0; r < int'(ROWS); r++) begin
      open(r, 0, 1, 0, r * 7);
      for (int c = 1; c < int'(COLS); c++) access(0, 1, c, r * 7 + c);
    end
    close();
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        open(r, 1, 0, c, 0);
        close();
      end
    // Random traffic; every wordline is revisited well within RET cycles.
    for (int n = 0; n < 3000; n++) begin
      int kind, r, c, v;
      kind = int'($urandom_range(9));
      r = int'($urandom_range(ROWS - 1));
      c = int'($urandom_range(COLS - 1));
      v = int'($urandom_range(62)) - 31;
      if (open_row < 0 || kind == 0) open(r, $urandom_range(1), $urandom_range(1), c, v);
      else if (kind == 1) close();
      else access($urandom_range(1), $urandom_range(1), c, v);
      if (n % 8 == 7)   // sweep all rows to keep them fresh
        for (int rr = 0; rr < int'(ROWS); rr++) open(rr, 0, 0, 0, 0);
    end
    if (open_row >= 0) close();
    check(retention_err == 1'b0, "no retention error under regular traffic");

    // Row 1 left alone past the limit, then fully rewritten before reading:
    // no error. Row 2 left alone and read: error.
    repeat (RET + 10) @(posedge clk);
    #1;
    open(1, 0, 1, 0, 5);
    for (int c = 1; c < int'(COLS); c++) access(0, 1, c, c);
    for (int c = 0; c < int'(COLS); c++) access(1, 0, c, 0);
    close();
    check(retention_err == 1'b0, "rewritten expired row reads cleanly");
    open(2, 1, 0, 3, 0);
    close();
    check(retention_err == 1'b1, "expired row read raises retention_err");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
