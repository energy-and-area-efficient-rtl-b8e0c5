// edram_msg_mem: one memory block of the partially parallel decoder, built
// from a planar eDRAM sub-array (edram_bank) and its interleaved page-mode
// controller (edram_page_ctrl).
//
// The block stores DEPTH messages, COLS to a wordline (DEPTH/COLS rounded up
// wordlines; the last one may be partly used). To the decoder it looks like a
// single-port memory with a combinational read: in one cycle a node unit can
// read the message at addr (rdata, valid in the same cycle), compute, and
// write its update back to the same addr at the clock edge (re and we
// together). Wordline activations and write-backs are hidden inside the
// cycle of the first access to a new wordline; this cycle-level view of the
// array timing is this design's assumption. flush writes the open wordline
// back and must be issued in a cycle without a request; the decoder does so
// at the end of every phase.
//
// act_pulse / wb_pulse mark wordline activations and write-backs (the
// energy-relevant events); retention_err is sticky and reports a read of a
// message that sat in the cells longer than RETENTION_CYCLES.
module edram_msg_mem
  import ldpc_pkg::*;
#(
  parameter int unsigned DEPTH            = P_DEF,
  parameter int unsigned COLS             = WL_MSGS_DEF,
  parameter int unsigned RETENTION_CYCLES = RETENTION_DEF,
  parameter bit          MODEL_RETENTION  = 1'b1,
  localparam int unsigned ROWS = (DEPTH + COLS - 1) / COLS,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW   = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          re,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  msg_t          wdata,
  output msg_t          rdata,
  input  logic          flush,
  output logic          act_pulse,
  output logic          wb_pulse,
  output logic          retention_err
);

  logic          act, wb, col_re, col_we;
  logic [RW-1:0] act_row, wb_row;
  logic [CW-1:0] col;

  edram_page_ctrl #(.DEPTH(DEPTH), .COLS(COLS)) u_ctrl (
    .clk, .rst_n,
    .req_re(re), .req_we(we), .req_addr(addr), .flush,
    .act, .act_row, .wb, .wb_row, .col_re, .col_we, .col,
    .act_pulse, .wb_pulse
  );

  edram_bank #(
    .ROWS(ROWS), .COLS(COLS),
    .RETENTION_CYCLES(RETENTION_CYCLES), .MODEL_RETENTION(MODEL_RETENTION)
  ) u_bank (
    .clk, .rst_n,
    .act, .act_row, .wb, .wb_row, .col_re, .col_we, .col,
    .col_wdata(wdata), .col_rdata(rdata), .retention_err
  );

endmodule
