// edram_page_ctrl: interleaved page-mode read/write control for one eDRAM
// sub-array.
//
// A conventional DRAM controller turns every read and every write into its
// own activate / write-back pair, so a read-modify-write of the t messages of
// one wordline costs 2t activations and 2t write-backs. This controller
// instead keeps a wordline open in the sense amplifiers for as long as the
// requests stay on it: the first request to a wordline activates it (after
// writing back whichever wordline was open), every following read and write
// to that wordline is served from the sense amplifiers, and the wordline is
// written back once, when the requests move on or when flush is raised. A
// sweep over a whole wordline therefore costs one activation and one
// write-back. A request may read and write the same message in one cycle,
// which is how a node unit's read, update and write-back are interleaved.
//
// Interface: req_re / req_we / req_addr are a flat message address (row =
// addr / COLS, column = addr mod COLS). flush closes the open wordline and
// must not coincide with a request. The act / wb / col outputs drive
// edram_bank in the same cycle. act_pulse and wb_pulse mark each wordline
// activation and write-back for energy accounting.
//
// The policy itself (keep the wordline in the sense amplifiers, interleave
// reads and writes there, write back once) follows the design this RTL
// implements. The address-to-wordline mapping, the explicit flush and the
// rule that a wordline is written back only when the next one is needed are
// this design's own choices.
module edram_page_ctrl #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned COLS  = 42,
  localparam int unsigned ROWS = (DEPTH + COLS - 1) / COLS,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW   = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_re,
  input  logic          req_we,
  input  logic [AW-1:0] req_addr,
  input  logic          flush,
  output logic          act,
  output logic [RW-1:0] act_row,
  output logic          wb,
  output logic [RW-1:0] wb_row,
  output logic          col_re,
  output logic          col_we,
  output logic [CW-1:0] col,
  output logic          act_pulse,
  output logic          wb_pulse
);

  logic          open_valid;
  logic [RW-1:0] open_row;
  logic          req;
  logic [RW-1:0] row;

  assign req     = req_re || req_we;
  assign row     = RW'(req_addr / AW'(COLS));
  assign col     = CW'(req_addr % AW'(COLS));
  assign act     = req && (!open_valid || (row != open_row));
  assign act_row = row;
  assign wb      = open_valid && (act || flush);
  assign wb_row  = open_row;
  assign col_re  = req_re;
  assign col_we  = req_we;

  assign act_pulse = act;
  assign wb_pulse  = wb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_valid <= 1'b0;
      open_row   <= '0;
    end else if (flush) begin
      open_valid <= 1'b0;
    end else if (act) begin
      open_valid <= 1'b1;
      open_row   <= row;
    end
  end

  a_no_flush_with_req: assert property (@(posedge clk) disable iff (!rst_n)
    !(flush && req))
    else $error("edram_page_ctrl: flush together with a request");

  a_addr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    !req || (32'(req_addr) < DEPTH))
    else $error("edram_page_ctrl: address beyond DEPTH");

endmodule
