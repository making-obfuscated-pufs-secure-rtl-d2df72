// apuf_delay_chain: behavioural model of the two N-stage delay chains of an
// arbiter PUF.
//
// N switch stages are connected in series; stage i is steered by challenge bit
// i (bit 0 is the stage nearest the launch point). A rising edge launched into
// both paths at time 0 reaches the arbiter on the top path at t_top and on the
// bottom path at t_bot. The stage delays come from copuf_pkg::stage_delay_fs
// with the per-die seed DIE_SEED, which stands in for the manufacturing
// process variation that makes each die's race unique.
//
// Interface: challenge is the (obfuscated) challenge applied to the switches;
// t_top/t_bot are the arrival times in femtoseconds. Combinational: the times
// are valid in the cycle the challenge is.
module apuf_delay_chain
  import copuf_pkg::*;
#(
  parameter int unsigned N        = 64,
  parameter logic [31:0] DIE_SEED = 32'h0000_1234
) (
  input  logic [N-1:0] challenge,
  output fs_t          t_top,
  output fs_t          t_bot
);

  fs_t top_t [N+1];
  fs_t bot_t [N+1];

  assign top_t[0] = '0;
  assign bot_t[0] = '0;

  for (genvar i = 0; i < N; i++) begin : g_stage
    apuf_switch_stage #(
      .D_TOP_STRAIGHT(stage_delay_fs(DIE_SEED, i, PATH_TOP_STRAIGHT)),
      .D_BOT_STRAIGHT(stage_delay_fs(DIE_SEED, i, PATH_BOT_STRAIGHT)),
      .D_TOP_CROSSED (stage_delay_fs(DIE_SEED, i, PATH_TOP_CROSSED)),
      .D_BOT_CROSSED (stage_delay_fs(DIE_SEED, i, PATH_BOT_CROSSED))
    ) u_stage (
      .c      (challenge[i]),
      .t_top_i(top_t[i]),
      .t_bot_i(bot_t[i]),
      .t_top_o(top_t[i+1]),
      .t_bot_o(bot_t[i+1])
    );
  end

  assign t_top = top_t[N];
  assign t_bot = bot_t[N];

endmodule
