// turbo_pkg: types and constants shared by the turbo codec blocks.
//
// Word lengths: channel LLRs are 8-bit signed with 2 fractional bits (Q5.2),
// extrinsic and a-posteriori LLRs 10-bit (Q7.2), trellis state metrics 14-bit;
// every LLR and metric has two fractional bits (quarter units).
// All LLRs are ln(P(bit=0)/P(bit=1)): a negative value decides for bit 1, and
// BPSK sends bit 0 as +1 and bit 1 as -1. These word lengths and the sign
// convention are this design's choices; the algorithms they serve (Max-Log-MAP
// and Log-MAP, square block interleaver, one-register RSC code) follow the
// design description.
//
// A code word travels on four lanes. Data words use lanes
// {LANE_SYS, LANE_PAR1, LANE_PAR2}; the single tail word after the K data
// words carries {TAIL_SYS1, TAIL_PAR1, TAIL_SYS2, TAIL_PAR2}, the
// zero-termination bits of both constituent encoders.
package turbo_pkg;

  localparam int LLR_W  = 8;   // channel LLR
  localparam int EXT_W  = 10;  // extrinsic / a-posteriori LLR
  localparam int MET_W  = 14;  // state metric
  localparam int LANES  = 4;

  localparam int LANE_SYS  = 0;
  localparam int LANE_PAR1 = 1;
  localparam int LANE_PAR2 = 2;
  localparam int TAIL_SYS1 = 0;
  localparam int TAIL_PAR1 = 1;
  localparam int TAIL_SYS2 = 2;
  localparam int TAIL_PAR2 = 3;

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [EXT_W-1:0] ext_t;
  typedef logic signed [MET_W-1:0] met_t;
  typedef llr_t [LANES-1:0]        llr_vec_t;
  typedef logic [LANES-1:0]        code_bits_t;

  typedef enum logic {
    MAX_LOG_MAP = 1'b0,
    LOG_MAP     = 1'b1
  } algo_e;

  // Saturate a wide signed value to EXT_W bits.
  function automatic ext_t sat_ext(input logic signed [MET_W+1:0] v);
    localparam logic signed [MET_W+1:0] HI = (MET_W+2)'(2**(EXT_W-1) - 1);
    localparam logic signed [MET_W+1:0] LO = -(MET_W+2)'(2**(EXT_W-1));
    if (v > HI)      return ext_t'(HI);
    else if (v < LO) return ext_t'(LO);
    else             return ext_t'(v);
  endfunction

endpackage
