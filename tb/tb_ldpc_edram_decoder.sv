// tb_ldpc_edram_decoder: end-to-end test of the decoder at a reduced size
// (circulants of 64, 2 x 4 block array of weight-2 circulants, 8 iterations,
// 5 messages per wordline, retention limit 300 cycles, above the 130-cycle
// iteration). Three codewords are decoded back to back and checked
// bit-exactly by ldpc_tb_core against a reference min-sum decoder, together
// with latency, activation counts and retention. A second decoder with the
// same inputs but a retention limit of 100 cycles, shorter than the 130-cycle
// iteration, must report a retention error: with that cell it would need
// refresh.
module tb_ldpc_edram_decoder;
  import ldpc_pkg::*;

  localparam int unsigned P = 64, MB = 2, NB = 4, PERM = 2, ITER = 8, WL = 5;
  localparam int unsigned AW = $clog2(P), IW = $clog2(ITER);

  logic          clk, rst_n, in_valid, in_ready, out_valid, done, retention_err;
  msg_t          in_llr [NB];
  logic [AW-1:0] out_col;
  logic [NB-1:0] out_bits;
  logic [IW-1:0] iteration;
  logic [31:0]   act_count, wb_count;
  logic          aux_retention_err;

  ldpc_edram_decoder #(
    .P(P), .MB(MB), .NB(NB), .PERM(PERM), .ITER(ITER), .WL_MSGS(WL),
    .RETENTION_CYCLES(300)
  ) dut (.*);

  ldpc_edram_decoder #(
    .P(P), .MB(MB), .NB(NB), .PERM(PERM), .ITER(ITER), .WL_MSGS(WL),
    .RETENTION_CYCLES(100)
  ) dut_short (
    .clk, .rst_n, .in_valid, .in_ready(), .in_llr, .out_valid(), .out_col(),
    .out_bits(), .done(), .iteration(), .act_count(), .wb_count(),
    .retention_err(aux_retention_err)
  );

  ldpc_tb_core #(
    .P(P), .MB(MB), .NB(NB), .PERM(PERM), .ITER(ITER), .WL_MSGS(WL),
    .NCW(3), .FLIP_PM(15), .AUX_EXPECT(1'b1)
  ) core (.*);
endmodule
