// ldpc_pkg: types and constants shared by the QC-LDPC decoder and its planar
// eDRAM memory blocks.
//
// The code is a 2 x 32 array of 1024 x 1024 circulants, each circulant of row
// and column weight 2 (rate 15/16, 32768-bit codeword), decoded with 6-bit
// messages for 16 iterations. Each eDRAM wordline holds 42 messages. These are
// the numbers of the design this RTL follows. The circulant shift values are
// not part of that description; circ_shift() below is this design's own
// choice of code, and any other set of shifts can be dropped in.
//
// Messages are 6-bit two's complement log-likelihood ratios, kept symmetric
// in [-31, +31] by saturation (a positive value favours bit 0).
package ldpc_pkg;

  localparam int unsigned MSG_W           = 6;     // bits per message
  localparam int unsigned P_DEF           = 1024;  // circulant size p
  localparam int unsigned MB_DEF          = 2;     // block rows m
  localparam int unsigned NB_DEF          = 32;    // block columns n
  localparam int unsigned PERM_DEF        = 2;     // weight of one circulant
  localparam int unsigned ITER_DEF        = 16;    // decoding iterations
  localparam int unsigned WL_MSGS_DEF     = 42;    // messages per eDRAM wordline
  // 3 us retention (Table I, width 1) at the clock at which one iteration of
  // 2*1024+2 cycles lasts 1.45 us: 3.0/1.45*2050 = 4241 cycles.
  localparam int unsigned RETENTION_DEF   = 4241;

  localparam int signed MSG_MAX = (1 <<< (MSG_W - 1)) - 1;   // +31

  typedef logic signed [MSG_W-1:0] msg_t;

  // Decoder schedule phases.
  typedef enum logic [1:0] {
    PH_LOAD  = 2'd0,   // channel LLRs written into input and message memories
    PH_CHECK = 2'd1,   // CNUs update messages row by row
    PH_VAR   = 2'd2,   // VNUs update messages column by column
    PH_FLUSH = 2'd3    // every memory block writes its open wordline back
  } phase_e;

  // Saturate a wide signed value to the symmetric message range.
  function automatic msg_t sat_msg(input int signed v);
    if (v > MSG_MAX)       return msg_t'(MSG_MAX);
    else if (v < -MSG_MAX) return msg_t'(-MSG_MAX);
    else                   return msg_t'(v);
  endfunction

  // Shift of permutation k inside circulant (i, j): row r of that permutation
  // has its one in column (r + shift) mod p. The polynomial was picked so
  // that the two permutations of a circulant never coincide and short cycles
  // are rare: for p = 1024 with 2 x 32 circulants it leaves 40 length-4
  // cycle paths in the Tanner graph, and none for p = 64 with 2 x 4.
  function automatic int unsigned circ_shift(input int unsigned i,
                                             input int unsigned j,
                                             input int unsigned k,
                                             input int unsigned p);
    return (j*j*(2*i + 3) + j*(7 + 10*i) + k*(2*j + 1)*(2*i + 1)*(5*j + 3)
            + 13*i*k + 29*i) % p;
  endfunction

endpackage
