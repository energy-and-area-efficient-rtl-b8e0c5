// ldpc_edram_decoder: partially parallel QC-LDPC decoder whose message and
// channel memories are planar eDRAM sub-arrays run in interleaved page mode.
//
// Code: an (MB*P) x (NB*P) parity check matrix made of MB x NB circulants of
// size P, each the sum of PERM cyclic permutations (row and column weight
// PERM). Defaults: 2 x 32 circulants of 1024 x 1024, weight 2, so each check
// has 64 edges and each bit 4; 6-bit messages; 16 iterations; 42 messages per
// eDRAM wordline.
//
// Architecture (folding factor P): one CNU per block row and one VNU per
// block column, each handling its P rows or columns one per cycle. Every
// permutation of every circulant owns one memory block (edram_msg_mem) of P
// messages; the message of edge (row r, column c) sits at address c. In the
// check phase, cycle r, block (i,j,k) is read and written at address
// (r + shift_ijk) mod P and feeds CNU i; in the variable phase, cycle c, all
// blocks of block column j are read and written at address c and feed VNU j,
// together with the channel LLR from that column's input memory block. Every
// memory access is a read, an update and a write-back of the same message in
// one cycle. Because all addresses advance by one per cycle, each block
// sweeps its wordlines in order, and its page-mode controller opens each
// wordline once, serves all its messages from the sense amplifiers and
// writes it back once (a wordline split by the wrap-around of a shifted sweep
// is opened twice). All messages are rewritten in every phase, so no eDRAM
// refresh is needed as long as one phase is shorter than the retention time;
// retention_err reports any violation.
//
// Interface: during LOAD (in_ready high) one beat per accepted in_valid gives
// the LLRs of column cnt of every block column, in_llr[j] for block column j;
// P beats make a codeword. The LLRs are written to the input memories and, as
// initial variable-to-check messages, to every message block. In the last
// iteration's variable phase out_valid is high for P cycles and out_bits[j]
// is the hard decision of bit j*P + out_col. done pulses once the codeword is
// finished; loading of the next codeword can then begin. iteration is the
// index of the iteration in progress. act_count and
// wb_count total the wordline activations and write-backs of all memory
// blocks since reset.
//
// The architecture, the code dimensions, message width, iteration count and
// the page-mode policy follow the design this RTL implements; the offset min-sum
// node algorithm, the shift values (ldpc_pkg::circ_shift), the interface,
// the one-cycle read-modify-write and the flush cycles are this design's own.
module ldpc_edram_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned P                = P_DEF,
  parameter int unsigned MB               = MB_DEF,
  parameter int unsigned NB               = NB_DEF,
  parameter int unsigned PERM             = PERM_DEF,
  parameter int unsigned ITER             = ITER_DEF,
  parameter int unsigned WL_MSGS          = WL_MSGS_DEF,
  parameter int unsigned RETENTION_CYCLES = RETENTION_DEF,
  localparam int unsigned AW   = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned IW   = (ITER > 1) ? $clog2(ITER) : 1,
  localparam int unsigned NMSG = MB * NB * PERM,
  localparam int unsigned NMEM = NMSG + NB
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  msg_t          in_llr [NB],
  output logic          out_valid,
  output logic [AW-1:0] out_col,
  output logic [NB-1:0] out_bits,
  output logic          done,
  output logic [IW-1:0] iteration,
  output logic [31:0]   act_count,
  output logic [31:0]   wb_count,
  output logic          retention_err
);

  phase_e        phase;
  logic [AW-1:0] cnt;
  logic          access, flush;

  ldpc_ctrl #(.P(P), .ITER(ITER)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .phase, .cnt, .iter(iteration),
    .access, .flush, .out_valid, .done
  );

  assign out_col = cnt;

  msg_t          cnu_in  [MB][NB*PERM];
  msg_t          cnu_out [MB][NB*PERM];
  msg_t          vnu_in  [NB][MB*PERM];
  msg_t          vnu_out [NB][MB*PERM];
  msg_t          llr_rd  [NB];
  msg_t          llr_sat [NB];
  logic [NMEM-1:0] act_p, wb_p, ret_err;

  logic rd_phase;
  assign rd_phase = (phase == PH_CHECK) || (phase == PH_VAR);

  // ---------------------------------------------------------- message memories
  for (genvar i = 0; i < int'(MB); i++) begin : g_row
    for (genvar j = 0; j < int'(NB); j++) begin : g_col
      for (genvar k = 0; k < int'(PERM); k++) begin : g_perm
        localparam int unsigned SHIFT = circ_shift(i, j, k, P);
        localparam int unsigned B     = (i * NB + j) * PERM + k;
        logic [AW:0]   sum;
        logic [AW-1:0] addr;
        msg_t          wdata, rdata;

        assign sum  = {1'b0, cnt} + (AW+1)'(SHIFT);
        assign addr = (phase == PH_CHECK)
                        ? ((sum >= (AW+1)'(P)) ? AW'(sum - (AW+1)'(P)) : AW'(sum))
                        : cnt;

        always_comb begin
          unique case (phase)
            PH_CHECK: wdata = cnu_out[i][j*PERM+k];
            PH_VAR:   wdata = vnu_out[j][i*PERM+k];
            default:  wdata = llr_sat[j];
          endcase
        end

        assign cnu_in[i][j*PERM+k] = rdata;
        assign vnu_in[j][i*PERM+k] = rdata;

        edram_msg_mem #(
          .DEPTH(P), .COLS(WL_MSGS), .RETENTION_CYCLES(RETENTION_CYCLES)
        ) u_mem (
          .clk, .rst_n,
          .re(rd_phase), .we(access), .addr, .wdata, .rdata, .flush,
          .act_pulse(act_p[B]), .wb_pulse(wb_p[B]), .retention_err(ret_err[B])
        );
      end
    end
  end

  // ------------------------------------------------ channel LLR input memories
  for (genvar j = 0; j < int'(NB); j++) begin : g_in
    assign llr_sat[j] = sat_msg(int'(in_llr[j]));

    edram_msg_mem #(
      .DEPTH(P), .COLS(WL_MSGS), .RETENTION_CYCLES(RETENTION_CYCLES)
    ) u_llr_mem (
      .clk, .rst_n,
      .re(phase == PH_VAR), .we(phase == PH_LOAD && access),
      .addr(cnt), .wdata(llr_sat[j]), .rdata(llr_rd[j]), .flush,
      .act_pulse(act_p[NMSG+j]), .wb_pulse(wb_p[NMSG+j]),
      .retention_err(ret_err[NMSG+j])
    );
  end

  // ------------------------------------------------------------- node units
  for (genvar i = 0; i < int'(MB); i++) begin : g_cnu
    cnu #(.DEG(NB * PERM)) u_cnu (.v2c(cnu_in[i]), .c2v(cnu_out[i]));
  end

  for (genvar j = 0; j < int'(NB); j++) begin : g_vnu
    vnu #(.DEG(MB * PERM)) u_vnu (
      .llr(llr_rd[j]), .c2v(vnu_in[j]), .v2c(vnu_out[j]), .hard_bit(out_bits[j])
    );
  end

  // ------------------------------------------------- activity and retention
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_count     <= '0;
      wb_count      <= '0;
      retention_err <= 1'b0;
    end else begin
      act_count     <= act_count + 32'($countones(act_p));
      wb_count      <= wb_count + 32'($countones(wb_p));
      retention_err <= retention_err | (|ret_err);
    end
  end

endmodule
