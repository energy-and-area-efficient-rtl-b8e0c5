// tb_edram_page_ctrl: self-checking test of the interleaved page-mode
// controller (50 messages, 6 per wordline).
//
// Sequential sweeps (the decoder's pattern) must cost exactly one activation
// and one write-back per wordline touched; random traffic mixing sweeps,
// jumps, idle cycles and flushes is compared cycle by cycle with the
// controller's rules: activate only when the request leaves the open
// wordline or none is open, write back the open wordline when another is
// activated or on flush, never otherwise, and pass row and column of the
// address through.
module tb_edram_page_ctrl;

  localparam int unsigned DEPTH = 50, COLS = 6;
  localparam int unsigned AW = $clog2(DEPTH);

  logic          clk = 0, rst_n = 0;
  logic          req_re = 0, req_we = 0, flush = 0;
  logic [AW-1:0] req_addr = '0;
  logic          act, wb, col_re, col_we, act_pulse, wb_pulse;
  logic [3:0]    act_row, wb_row;
  logic [2:0]    col;

  int checks = 0, failures = 0;
  int open_row = -1;
  int acts = 0, wbs = 0;

  edram_page_ctrl #(.DEPTH(DEPTH), .COLS(COLS)) dut (
    .clk, .rst_n, .req_re, .req_we, .req_addr, .flush,
    .act, .act_row, .wb, .wb_row, .col_re, .col_we, .col, .act_pulse, .wb_pulse
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Apply one cycle and check the outputs against the rules.
  task automatic step(input bit re, input bit we, input int a, input bit fl);
    bit exp_act, exp_wb;
    int row;
    req_re = re; req_we = we; req_addr = AW'(a); flush = fl;
    row = a / int'(COLS);
    #1;
    exp_act = (re || we) && (open_row < 0 || open_row != row);
    exp_wb  = (open_row >= 0) && (exp_act || fl);
    check(act == exp_act, $sformatf("act a=%0d open=%0d", a, open_row));
    check(wb == exp_wb, $sformatf("wb a=%0d open=%0d", a, open_row));
    if (exp_act) check(int'(act_row) == row, "act_row");
    if (exp_wb)  check(int'(wb_row) == open_row, "wb_row");
    if (re || we) check(int'(col) == a % int'(COLS) && col_re == re && col_we == we, "column");
    check(act_pulse == act && wb_pulse == wb, "pulses");
    @(posedge clk);
    acts += int'(exp_act); wbs += int'(exp_wb);
    if (fl) open_row = -1;
    else if (exp_act) open_row = row;
    #1;
    req_re = 0; req_we = 0; flush = 0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a0, w0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // A full read-modify-write sweep: ceil(50/6) = 9 wordlines.
    a0 = acts; w0 = wbs;
    for (int a = 0; a < int'(DEPTH); a++) step(1, 1, a, 0);
    step(0, 0, 0, 1);
    check(acts - a0 == 9 && wbs - w0 == 9, $sformatf("sweep cost %0d/%0d, expected 9/9", acts - a0, wbs - w0));
    // A sweep starting mid-wordline wraps around and splits that wordline.
    a0 = acts;
    for (int n = 0; n < int'(DEPTH); n++) step(1, 1, (n + 20) % int'(DEPTH), 0);
    step(0, 0, 0, 1);
    check(acts - a0 == 10, $sformatf("wrapped sweep cost %0d, expected 10", acts - a0));
    // Random traffic.
    for (int n = 0; n < 5000; n++) begin
      int kind, a;
      kind = int'($urandom_range(19));
      a = int'($urandom_range(DEPTH - 1));
      if (kind == 0)      step(0, 0, 0, 1);
      else if (kind < 3)  step(0, 0, 0, 0);
      else                step($urandom_range(1), $urandom_range(1), a, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
