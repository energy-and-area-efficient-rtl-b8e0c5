// vnu: variable node unit, update of one code bit per cycle.
//
// The unit adds the channel LLR of a code bit to the DEG check-to-variable
// messages of that bit, giving the a-posteriori value. Each outgoing
// variable-to-check message is that sum minus the incoming message on the
// same edge, saturated to the 6-bit range [-31, +31]. The hard decision is 1
// when the a-posteriori value is negative (a positive LLR favours 0). The
// decoder names the unit; the sum-and-exclude update is the standard one for
// min-sum decoding and is this design's choice.
//
// Purely combinational, like the CNU: read, update and write-back of one
// column of messages happen in one cycle.
module vnu
  import ldpc_pkg::*;
#(
  parameter int unsigned DEG = MB_DEF * PERM_DEF   // column weight, 4
) (
  input  msg_t llr,
  input  msg_t c2v [DEG],
  output msg_t v2c [DEG],
  output logic hard_bit
);

  localparam int unsigned SW = MSG_W + $clog2(DEG + 2);
  typedef logic signed [SW-1:0] sum_t;

  sum_t total;
  sum_t extr [DEG];

  always_comb begin
    total = sum_t'(llr);
    for (int k = 0; k < int'(DEG); k++) total += sum_t'(c2v[k]);
    for (int k = 0; k < int'(DEG); k++) begin
      extr[k] = total - sum_t'(c2v[k]);
      v2c[k]  = sat_msg(int'(extr[k]));
    end
    hard_bit = total[SW-1];
  end

endmodule
