// ldpc_ctrl: schedule of the partially parallel QC-LDPC decoder.
//
// One codeword goes through
//   LOAD  : P beats of channel LLRs, one per block column and beat, accepted
//           whenever in_valid is high (in_ready is high throughout LOAD);
//   then ITER iterations of
//   CHECK : P cycles, cycle r updating check row r of every block row;
//   VAR   : P cycles, cycle c updating column c of every block column.
// Every phase is followed by one FLUSH cycle in which all memory blocks write
// their open wordline back, so every wordline is restored once per phase.
// The hard decisions are valid during the VAR phase of the last iteration
// (out_valid), and done pulses in the FLUSH cycle that ends the codeword,
// after which the controller is back in LOAD.
//
// Latency from the last load beat to done: 1 + ITER * (2P + 2) cycles.
// The folding factor P and the iteration count follow the decoder this RTL
// implements; the flush cycles and the non-overlapped load are this design's
// own choices.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned ITER = ITER_DEF,
  localparam int unsigned AW  = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned IW  = (ITER > 1) ? $clog2(ITER) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output phase_e        phase,
  output logic [AW-1:0] cnt,        // row (CHECK) or column (LOAD, VAR) index
  output logic [IW-1:0] iter,
  output logic          access,     // memory blocks are accessed this cycle
  output logic          flush,      // memory blocks close their wordline
  output logic          out_valid,  // hard decisions of column cnt are valid
  output logic          done
);

  phase_e next_ph;
  logic   last_cnt, last_iter;

  assign last_cnt  = (cnt == AW'(P - 1));
  assign last_iter = (iter == IW'(ITER - 1));
  assign in_ready  = (phase == PH_LOAD);
  assign access    = (phase == PH_LOAD && in_valid) || phase == PH_CHECK || phase == PH_VAR;
  assign flush     = (phase == PH_FLUSH);
  assign out_valid = (phase == PH_VAR) && last_iter;
  assign done      = (phase == PH_FLUSH) && (next_ph == PH_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= PH_LOAD;
      next_ph <= PH_LOAD;
      cnt     <= '0;
      iter    <= '0;
    end else begin
      unique case (phase)
        PH_LOAD: if (in_valid) begin
          cnt <= last_cnt ? '0 : cnt + 1'b1;
          if (last_cnt) begin
            phase   <= PH_FLUSH;
            next_ph <= PH_CHECK;
          end
        end
        PH_CHECK: begin
          cnt <= last_cnt ? '0 : cnt + 1'b1;
          if (last_cnt) begin
            phase   <= PH_FLUSH;
            next_ph <= PH_VAR;
          end
        end
        PH_VAR: begin
          cnt <= last_cnt ? '0 : cnt + 1'b1;
          if (last_cnt) begin
            phase   <= PH_FLUSH;
            next_ph <= last_iter ? PH_LOAD : PH_CHECK;
            iter    <= last_iter ? '0 : iter + 1'b1;
          end
        end
        PH_FLUSH: phase <= next_ph;
      endcase
    end
  end

endmodule
