// cnu: check node unit, offset min-sum update of one parity check per cycle.
//
// The unit receives the DEG variable-to-check messages of one check node and
// returns the DEG check-to-variable messages. Each output carries the product
// of the signs of the other DEG-1 inputs and the smallest magnitude among
// them: the overall minimum (min1) for every edge except the one that holds
// it, which gets the second minimum (min2). When several inputs share the
// minimum, the first of them is the "holder" and the others get min1, which
// equals min2 in that case. The magnitude is then reduced by OFFSET (not
// below zero), which corrects the overestimate of plain min-sum; without it,
// decoding of the degree-64 checks of the default code oscillates instead of
// converging. The decoder names the unit but not its algorithm; offset
// min-sum with offset 1 is this design's choice.
//
// Purely combinational: the decoder reads, updates and writes back the
// messages of one check node in a single cycle. Inputs are expected in the
// symmetric range [-31, +31]; outputs stay in it.
module cnu
  import ldpc_pkg::*;
#(
  parameter int unsigned DEG    = PERM_DEF * NB_DEF,   // row weight, 64
  parameter int unsigned OFFSET = 1                    // magnitude offset
) (
  input  msg_t v2c [DEG],
  output msg_t c2v [DEG]
);

  localparam int unsigned MW = MSG_W - 1;   // magnitude bits
  localparam int unsigned IW = (DEG > 1) ? $clog2(DEG) : 1;

  logic [MW-1:0] mag [DEG];
  logic [DEG-1:0] sgn;
  logic [MW-1:0] min1, min2;
  logic [IW-1:0] idx1;
  logic          parity;

  always_comb begin
    for (int k = 0; k < int'(DEG); k++) begin
      sgn[k] = v2c[k][MSG_W-1];
      mag[k] = sgn[k] ? MW'(-v2c[k]) : MW'(v2c[k]);
    end
    parity = ^sgn;
    min1 = '1;
    min2 = '1;
    idx1 = '0;
    for (int k = 0; k < int'(DEG); k++) begin
      if (mag[k] < min1) begin
        min2 = min1;
        min1 = mag[k];
        idx1 = IW'(k);
      end else if (mag[k] < min2) begin
        min2 = mag[k];
      end
    end
    for (int k = 0; k < int'(DEG); k++) begin
      logic [MW-1:0] m;
      m = (IW'(k) == idx1) ? min2 : min1;
      m = (m > MW'(OFFSET)) ? m - MW'(OFFSET) : '0;
      c2v[k] = (parity ^ sgn[k]) ? -msg_t'({1'b0, m}) : msg_t'({1'b0, m});
    end
  end

endmodule
