// edram_bank: one planar eDRAM sub-array with its row of sense amplifiers.
//
// The array holds ROWS wordlines of COLS messages each. Reading a wordline is
// destructive: an activation (act) copies the whole wordline into the sense
// amplifier register, where it stays until a write-back (wb) restores it into
// the cells. While a wordline is open, single messages are read and written
// directly in the sense amplifiers (col_re / col_we), so that one activation
// and one write-back serve every access to that wordline. This is how the
// sense amplifiers stand in for a register file in interleaved page mode.
//
// Timing: all commands take effect at the rising clock edge. When act is
// high, col_rdata returns the cell contents of act_row in the same cycle and
// a column write in that cycle lands in the freshly opened wordline. wb
// writes the sense amplifier contents (as they were before this edge) into
// wb_row; wb and act may be issued together to close one wordline and open
// the next (or to reopen the same one, which then sees the restored data). A column access without act addresses the open wordline.
//
// Retention: planar eDRAM cells keep their charge for only a few
// microseconds. Each wordline has an age counter, cleared when the wordline
// is written back. If a wordline older than RETENTION_CYCLES is activated,
// its messages are marked lost; reading a lost message before it has been
// rewritten raises the sticky retention_err output. These counters model the
// physics of the cell so that a schedule can be checked against the
// retention time; they have no counterpart in the silicon array. Set
// MODEL_RETENTION to 0 to drop them. At reset every wordline counts as
// expired, since nothing valid has been stored yet. The storage array itself
// is not reset.
//
// The sense amplifiers holding a whole wordline between activation and
// write-back, and the retention time, follow the design this RTL implements;
// the command interface and the same-cycle timing are this design's own.
module edram_bank
  import ldpc_pkg::*;
#(
  parameter int unsigned ROWS             = 25,
  parameter int unsigned COLS             = WL_MSGS_DEF,
  parameter int unsigned RETENTION_CYCLES = RETENTION_DEF,
  parameter bit          MODEL_RETENTION  = 1'b1,
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          act,        // activate act_row into the sense amplifiers
  input  logic [RW-1:0] act_row,
  input  logic          wb,         // write the sense amplifiers back to wb_row
  input  logic [RW-1:0] wb_row,
  input  logic          col_re,     // column read of the open (or opening) row
  input  logic          col_we,     // column write of the open (or opening) row
  input  logic [CW-1:0] col,
  input  msg_t          col_wdata,
  output msg_t          col_rdata,
  output logic          retention_err
);

  localparam int unsigned AGE_MAX = RETENTION_CYCLES + 1;
  localparam int unsigned AW      = $clog2(AGE_MAX + 1);

  msg_t [COLS-1:0] cells [ROWS];     // the storage array
  msg_t [COLS-1:0] sa;               // sense amplifier register
  msg_t [COLS-1:0] sa_next;
  msg_t [COLS-1:0] sensed;           // wordline seen by an activation

  // Re-activating the wordline being written back sees the restored data.
  assign sensed = (wb && (wb_row == act_row)) ? sa : cells[act_row];

  // Contents of the wordline after this cycle's activation and column write.
  always_comb begin
    sa_next = act ? sensed : sa;
    if (col_we) sa_next[col] = col_wdata;
  end

  assign col_rdata = act ? sensed[col] : sa[col];

  always_ff @(posedge clk) begin
    if (wb)                 cells[wb_row] <= sa;
    if (act || col_we)      sa            <= sa_next;
  end

  // ---------------------------------------------------------------- retention
  if (MODEL_RETENTION) begin : g_ret
    logic [AW-1:0]   age [ROWS];
    logic [COLS-1:0] lost;           // per message of the open wordline
    logic            expired;
    logic            read_lost;

    assign expired   = act && !(wb && (wb_row == act_row)) &&
                       (age[act_row] > AW'(RETENTION_CYCLES));
    assign read_lost = col_re && (act ? expired : lost[col]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int r = 0; r < int'(ROWS); r++) age[r] <= AW'(AGE_MAX);
        lost          <= '1;
        retention_err <= 1'b0;
      end else begin
        for (int r = 0; r < int'(ROWS); r++)
          if (age[r] != AW'(AGE_MAX)) age[r] <= age[r] + 1'b1;
        if (wb) age[wb_row] <= '0;
        if (act) lost <= {COLS{expired}};
        if (col_we) lost[col] <= 1'b0;
        if (read_lost) retention_err <= 1'b1;
      end
    end
  end else begin : g_noret
    assign retention_err = 1'b0;
  end

endmodule
