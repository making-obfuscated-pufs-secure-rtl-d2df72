// dual_ff_storage: response storage behind the arbiter, with the dual
// flip-flop countermeasure.
//
// The arbiter latch has two complementary outputs. A plain design stores only
// q; its flip-flop then draws a current that depends on the response, which a
// power measurement can read. With DUAL=1 a second, identical flip-flop stores
// qb at the same clock edge, so exactly one of the two changes state whenever
// the response changes and the switching current no longer tells 0 from 1.
// The loads on the two outputs (resp and resp_b) must match for this to work;
// that is a matter of layout, not of this logic. With DUAL=0 only the q
// flip-flop exists and resp_b is held at 0.
//
// Interface: capture stores q_in/qb_in on the next rising edge; set_*/rst_*
// initialise each flip-flop (set before reset), as driven by rand_resp_init.
module dual_ff_storage #(
  parameter bit DUAL = 1'b1
) (
  input  logic clk,
  input  logic capture,
  input  logic q_in,
  input  logic qb_in,
  input  logic set_q,
  input  logic rst_q,
  input  logic set_qb,
  input  logic rst_qb,
  output logic resp,
  output logic resp_b
);

  response_ff u_ff_q (
    .clk(clk), .set(set_q), .rst(rst_q), .en(capture), .d(q_in), .q(resp)
  );

  if (DUAL) begin : g_dual
    response_ff u_ff_qb (
      .clk(clk), .set(set_qb), .rst(rst_qb), .en(capture), .d(qb_in), .q(resp_b)
    );
  end else begin : g_single
    assign resp_b = 1'b0;
  end

endmodule
