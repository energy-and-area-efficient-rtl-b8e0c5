// tb_ldpc_full: end-to-end test of the decoder at its default size: 2 x 32
// circulants of 1024 x 1024 with weight 2 (32768-bit codewords), 6-bit
// messages, 16 iterations, 42 messages per eDRAM wordline, retention limit
// 4241 cycles. Two codewords (a noisy all-zero one and a random one) are
// decoded back to back (0.3% of the bits of the first one flipped) and
// checked by ldpc_tb_core: bit-exact hard decisions
// against a reference min-sum decoder, latency 1 + 16*(2*1024+2) cycles,
// activation and write-back counts, and no retention error without refresh.
module tb_ldpc_full;
  import ldpc_pkg::*;

  localparam int unsigned NB = NB_DEF;
  localparam int unsigned AW = $clog2(P_DEF), IW = $clog2(ITER_DEF);

  logic          clk, rst_n, in_valid, in_ready, out_valid, done, retention_err;
  msg_t          in_llr [NB];
  logic [AW-1:0] out_col;
  logic [NB-1:0] out_bits;
  logic [IW-1:0] iteration;
  logic [31:0]   act_count, wb_count;

  logic          aux_retention_err;
  assign aux_retention_err = 1'b0;

  ldpc_edram_decoder dut (.*);

  ldpc_tb_core #(.NCW(2), .FLIP_PM(3)) core (.*);
endmodule
