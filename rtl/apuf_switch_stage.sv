// apuf_switch_stage: behavioural model of one switch stage of an arbiter PUF.
//
// A switch stage is a pair of 2:1 multiplexers sharing one challenge bit. With
// the bit at 0 the rising edge on each path passes straight through (top to
// top, bottom to bottom); with the bit at 1 the two paths cross. Every one of
// the four multiplexer paths has its own delay, set by process variation.
//
// The stage is modelled, not built: the real part is an analog delay element.
// Edges are represented by their arrival times (femtoseconds after the launch)
// and the stage adds the delay of the path the edge takes. The four delays are
// parameters; the default values are the nominal delay (no variation).
//
// Interface: c selects straight (0) or crossed (1); t_top_i/t_bot_i are the
// arrival times at the inputs, t_top_o/t_bot_o at the outputs. Purely
// combinational: the outputs follow the inputs in the same cycle.
module apuf_switch_stage
  import copuf_pkg::*;
#(
  parameter fs_t D_TOP_STRAIGHT = fs_t'(STAGE_NOM_FS),
  parameter fs_t D_BOT_STRAIGHT = fs_t'(STAGE_NOM_FS),
  parameter fs_t D_TOP_CROSSED  = fs_t'(STAGE_NOM_FS),
  parameter fs_t D_BOT_CROSSED  = fs_t'(STAGE_NOM_FS)
) (
  input  logic c,
  input  fs_t  t_top_i,
  input  fs_t  t_bot_i,
  output fs_t  t_top_o,
  output fs_t  t_bot_o
);

  always_comb begin
    if (c) begin
      t_top_o = t_bot_i + D_TOP_CROSSED;
      t_bot_o = t_top_i + D_BOT_CROSSED;
    end else begin
      t_top_o = t_top_i + D_TOP_STRAIGHT;
      t_bot_o = t_bot_i + D_BOT_STRAIGHT;
    end
  end

endmodule
