// copuf_pkg: types and constants shared by the Challenge Obfuscated PUF (CO-PUF).
//
// The arbiter PUF is a race between two nominally identical delay paths. Its
// analog part is modelled here by arrival times in femtoseconds: every
// multiplexer path of every switch stage gets a delay of nominal value plus a
// process-variation term drawn from an approximately Gaussian distribution
// (sum of twelve uniform 16-bit values). The draw is a pure function of a per-die
// seed, the stage number and the path, so one seed stands for one fabricated
// die and every simulation of it sees the same delays. The nominal delay and
// spread are this design's own numbers; the source only states that the race
// comes from process variation.
//
// The countermeasure of the response storage is chosen by mitigation_e:
//   MIT_NONE    one flip-flop on Q (the unprotected CO-PUF),
//   MIT_DUAL_FF a matched second flip-flop on Q-bar,
//   MIT_RAND    one flip-flop set to a pseudo-random value before each query,
//   MIT_HYBRID  both of the above (the fully protected configuration).
package copuf_pkg;

  // Arrival times and delays, in femtoseconds.
  typedef logic [31:0] fs_t;

  typedef enum logic [1:0] {
    MIT_NONE    = 2'd0,
    MIT_DUAL_FF = 2'd1,
    MIT_RAND    = 2'd2,
    MIT_HYBRID  = 2'd3
  } mitigation_e;

  // Nominal delay of one multiplexer path and its one-sigma spread.
  localparam int unsigned STAGE_NOM_FS   = 20000;
  localparam int unsigned STAGE_SIGMA_FS = 1000;

  // Multiplexer paths of a switch stage, named by where they lead.
  localparam int unsigned PATH_TOP_STRAIGHT = 0; // top in    -> top out
  localparam int unsigned PATH_BOT_STRAIGHT = 1; // bottom in -> bottom out
  localparam int unsigned PATH_TOP_CROSSED  = 2; // bottom in -> top out
  localparam int unsigned PATH_BOT_CROSSED  = 3; // top in    -> bottom out

  // 32-bit integer hash (xorshift-multiply finaliser).
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Delay of one multiplexer path of one die, in femtoseconds.
  function automatic fs_t stage_delay_fs(input logic [31:0] seed,
                                         input int unsigned stage,
                                         input int unsigned path);
    longint g;
    logic [31:0] h;
    g = 0;
    for (int unsigned k = 0; k < 6; k++) begin
      h = mix32(seed ^ mix32(32'(stage) * 32'd32 + 32'(path) * 32'd8 + 32'(k) + 32'h9e37_79b9));
      g = g + longint'(h[15:0]) + longint'(h[31:16]);
    end
    // g - 6*65536 is close to N(0, 65536^2).
    g = g - longint'(6 * 65536);
    return fs_t'(longint'(STAGE_NOM_FS) + (g * longint'(STAGE_SIGMA_FS)) / 65536);
  endfunction

  // Feedback taps of the MISR (the x^N term is implicit), for the challenge
  // lengths evaluated: x^16+x^5+x^3+x^2+1, x^24+x^7+x^2+x+1, x^64+x^4+x^3+x+1.
  // Other lengths fall back to x^N+x+1.
  function automatic logic [63:0] misr_poly(input int unsigned n);
    case (n)
      16:      return 64'h2D;
      24:      return 64'h87;
      64:      return 64'h1B;
      default: return 64'h03;
    endcase
  endfunction

endpackage
