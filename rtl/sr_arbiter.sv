// sr_arbiter: behavioural model of the arbiter of an arbiter PUF, an S-R latch
// made of two cross-coupled NAND gates:  q = ~(top & qb),  qb = ~(bot & q).
//
// Before the launch both path signals are low and both outputs are high.
// Whichever path's rising edge arrives first pulls its side low and locks the
// latch: the top edge first gives q=0/qb=1, the bottom edge first gives
// q=1/qb=0. When the later edge arrives the latch holds. So q is the sign of
// the delay difference t_top - t_bot, the PUF response bit.
//
// The path signals are analog races of a few picoseconds, so they are modelled
// from arrival times: a free time base advances CLK_FS femtoseconds per clock
// while launch is high, and a path signal rises in the first cycle whose time
// reaches its arrival time. If both edges land in the same cycle, the exact
// times decide; an exact tie (metastability in silicon) resolves to q=0, this
// model's own choice. Dropping launch returns both paths low and the latch to
// q=qb=1.
//
// Interface: launch is the level of the edge sent into both chains; t_top and
// t_bot are the chain arrival times; q/qb are the latch outputs, combinational
// from the path signals and the latch state of the previous cycle.
module sr_arbiter
  import copuf_pkg::*;
#(
  parameter fs_t CLK_FS = fs_t'(1_000_000)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic launch,
  input  fs_t  t_top,
  input  fs_t  t_bot,
  output logic top_sig,
  output logic bot_sig,
  output logic q,
  output logic qb
);

  fs_t        elapsed_q;
  logic [1:0] latch_q;   // {q, qb} of the previous cycle
  logic [1:0] latch_d;

  // Time since the launch edge, saturating.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      elapsed_q <= '0;
    else if (!launch)
      elapsed_q <= '0;
    else if (elapsed_q <= ~fs_t'(0) - CLK_FS)
      elapsed_q <= elapsed_q + CLK_FS;
  end

  assign top_sig = launch && (elapsed_q >= t_top);
  assign bot_sig = launch && (elapsed_q >= t_bot);

  always_comb begin
    unique case ({top_sig, bot_sig})
      2'b00: latch_d = 2'b11;
      2'b10: latch_d = 2'b01;
      2'b01: latch_d = 2'b10;
      default: begin
        if (latch_q == 2'b01 || latch_q == 2'b10)
          latch_d = latch_q;
        else
          latch_d = (t_bot < t_top) ? 2'b10 : 2'b01;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) latch_q <= 2'b11;
    else        latch_q <= latch_d;
  end

  assign q  = latch_d[1];
  assign qb = latch_d[0];

endmodule
