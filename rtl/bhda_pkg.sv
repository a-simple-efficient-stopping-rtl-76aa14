// bhda_pkg: types and default sizes shared by the BHDA stopping-criterion
// blocks.
//
// The BHDA criterion (hard-decision aided stopping based on bit interleaved
// parity) ends turbo decoding when the n-bit BIP signature of the hard
// decisions of one pass equals the signature of the previous pass. The
// message length N = 640 is the frame size used in the design's evaluation.
// The BIP length n, the iteration limit and the LLR width are not fixed by
// the criterion itself and are this design's choices.
package bhda_pkg;

  // Message length N (bits per pass), evaluated frame size.
  localparam int unsigned DEF_N        = 640;
  // BIP code length n (our choice; any n works, n | N keeps the register
  // in natural order at the end of a pass).
  localparam int unsigned DEF_BIP_N    = 16;
  // Iteration limit that bounds decoding when the signatures never agree
  // (our choice, 10 iterations).
  localparam int unsigned DEF_MAX_ITER = 10;
  // Width of a soft value L(u_k), two's complement (our choice).
  localparam int unsigned DEF_LLR_W    = 8;

  // Why the decoding of a code block was stopped.
  typedef enum logic [1:0] {
    STOP_NONE      = 2'd0,  // still iterating
    STOP_BIP_MATCH = 2'd1,  // BIP(i) == BIP(i-1), i >= 2
    STOP_MAX_ITER  = 2'd2   // iteration limit reached without a match
  } stop_reason_e;

endpackage
