// rand_resp_init: randomized response setting.
//
// Before each challenge the response flip-flop is loaded with a pseudo-random
// bit, so the switching of that flip-flop when the real response is captured
// no longer follows the response. The random bit comes from a W-bit Fibonacci
// LFSR. Each init strobe advances it one step, with the least significant bit
// of the obfuscated challenge XORed into the feedback: the generator is thus
// reseeded on every query by a value an observer does not know.
//
// The bit reaches the flip-flop through its set and reset pins: reset is
// asserted during init and set carries the random bit, and since set wins the
// flip-flop gets the random bit. For the hybrid countermeasure the q-bar
// flip-flop is set to the complement, so the pair always holds opposite
// values. The source gives the set/reset scheme and the seeding with the LSB
// of the obfuscated challenge; the LFSR width, taps and reset value are this
// design's choices.
//
// Interface: init (one cycle) requests the initialisation; set_*/rst_* are
// valid combinationally in that same cycle and act on the flip-flops at the
// next rising edge; rbit is the bit being loaded.
module rand_resp_init #(
  parameter int unsigned  W     = 16,
  parameter logic [W-1:0] TAPS  = W'(16'hD008),   // x^16+x^15+x^13+x^4+1
  parameter logic [W-1:0] RESET = W'(16'hACE1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic chat_lsb,
  output logic rbit,
  output logic set_q,
  output logic rst_q,
  output logic set_qb,
  output logic rst_qb
);

  logic [W-1:0] lfsr_q;
  logic [W-1:0] lfsr_d;

  assign lfsr_d = {lfsr_q[W-2:0], (^(lfsr_q & TAPS)) ^ chat_lsb};
  assign rbit   = lfsr_d[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    lfsr_q <= RESET;
    else if (init) lfsr_q <= lfsr_d;
  end

  assign rst_q  = init;
  assign set_q  = init & rbit;
  assign rst_qb = init;
  assign set_qb = init & ~rbit;

endmodule
