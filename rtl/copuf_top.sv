// copuf_top: Challenge Obfuscated arbiter PUF with power side-channel
// countermeasures on its response storage.
//
// Datapath of one query:
//   challenge --(misr_obfuscator, nonce alpha)--> C-hat register
//   C-hat --> N switch stages (apuf_delay_chain) --> S-R latch (sr_arbiter)
//   latch q/qb --> response flip-flop(s) (dual_ff_storage)
//   rand_resp_init loads the flip-flop(s) with a pseudo-random value, seeded
//   with C-hat[0], before the response is captured.
// The obfuscation stops a model trained on challenge/response pairs; the
// countermeasures stop a model trained on the power drawn by the response
// flip-flop. MITIGATION selects none, dual flip-flop, randomized setting or
// both (hybrid, the default and the strongest combination).
//
// The query control of the referenced obfuscated PUF is not part of this
// design; its four strobes are ports, and a query is:
//   1. chal_load with challenge (when chal_ready or idle); wait for chal_ready
//      (MISR_CYCLES+1 clocks).
//   2. init for one cycle: the response flip-flop(s) take their random value
//      (ignored in MIT_NONE and MIT_DUAL_FF).
//   3. raise launch and hold it: the edge races down both chains; the latch
//      settles once both edges have arrived (ceil(t/CLK_FS)+1 cycles, 3
//      cycles for the default 64 stages at 1 GHz).
//   4. capture for one cycle: response (and response_b = its complement in
//      the dual modes) are valid on the next cycle. Then drop launch.
// The analog parts (switch stages and arbiter) are behavioural models driven
// by the per-die seed DIE_SEED; everything else is synthesizable.
module copuf_top
  import copuf_pkg::*;
#(
  parameter int unsigned N           = 64,
  parameter mitigation_e MITIGATION  = MIT_HYBRID,
  parameter int unsigned MISR_CYCLES = N,
  parameter logic [31:0] DIE_SEED    = 32'h0000_1234,
  parameter fs_t         CLK_FS      = fs_t'(1_000_000),
  parameter int unsigned PRNG_W      = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         nonce_we,
  input  logic [N-1:0] nonce,
  input  logic         chal_load,
  input  logic [N-1:0] challenge,
  output logic         chal_ready,
  input  logic         init,
  input  logic         launch,
  input  logic         capture,
  output logic         response,
  output logic         response_b
);

  localparam bit DUAL = (MITIGATION == MIT_DUAL_FF) || (MITIGATION == MIT_HYBRID);
  localparam bit RAND = (MITIGATION == MIT_RAND)    || (MITIGATION == MIT_HYBRID);

  logic [N-1:0] chat;
  logic         misr_busy;
  fs_t          t_top, t_bot;
  logic         arb_q, arb_qb;
  logic         r_set_q, r_rst_q, r_set_qb, r_rst_qb;
  logic         set_q, rst_q, set_qb, rst_qb;

  misr_obfuscator #(
    .N(N), .CYCLES(MISR_CYCLES)
  ) u_misr (
    .clk(clk), .rst_n(rst_n),
    .nonce_we(nonce_we), .nonce(nonce),
    .load(chal_load), .chal(challenge),
    .chat(chat), .busy(misr_busy), .ready(chal_ready)
  );

  apuf_delay_chain #(
    .N(N), .DIE_SEED(DIE_SEED)
  ) u_chain (
    .challenge(chat), .t_top(t_top), .t_bot(t_bot)
  );

  sr_arbiter #(
    .CLK_FS(CLK_FS)
  ) u_arbiter (
    .clk(clk), .rst_n(rst_n), .launch(launch),
    .t_top(t_top), .t_bot(t_bot),
    .top_sig(), .bot_sig(),
    .q(arb_q), .qb(arb_qb)
  );

  rand_resp_init #(
    .W(PRNG_W)
  ) u_rand (
    .clk(clk), .rst_n(rst_n),
    .init(init && RAND), .chat_lsb(chat[0]),
    .rbit(),
    .set_q(r_set_q), .rst_q(r_rst_q), .set_qb(r_set_qb), .rst_qb(r_rst_qb)
  );

  // Without the randomized setting the flip-flops are never initialised.
  assign set_q  = RAND & r_set_q;
  assign rst_q  = RAND & r_rst_q;
  assign set_qb = RAND & r_set_qb;
  assign rst_qb = RAND & r_rst_qb;

  dual_ff_storage #(
    .DUAL(DUAL)
  ) u_store (
    .clk(clk), .capture(capture),
    .q_in(arb_q), .qb_in(arb_qb),
    .set_q(set_q), .rst_q(rst_q), .set_qb(set_qb), .rst_qb(rst_qb),
    .resp(response), .resp_b(response_b)
  );

  // A query must not be launched while C-hat is still being formed.
  property p_no_launch_while_busy;
    @(posedge clk) disable iff (!rst_n) $rose(launch) |-> !misr_busy;
  endproperty
  a_no_launch_while_busy: assert property (p_no_launch_while_busy)
    else $error("launch raised while the MISR is busy");

endmodule
