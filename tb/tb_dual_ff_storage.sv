// tb_dual_ff_storage: checks that both flip-flops capture q/qb on the same
// edge, that each is initialised through its own set/reset, and that the
// single flip-flop variant holds resp_b at 0.
module tb_dual_ff_storage;
  logic clk = 0, capture, q_in, qb_in, set_q, rst_q, set_qb, rst_qb;
  logic resp, resp_b, resp1, resp1_b;
  logic m_q, m_qb;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  dual_ff_storage #(.DUAL(1'b1)) dut (
    .clk, .capture, .q_in, .qb_in, .set_q, .rst_q, .set_qb, .rst_qb,
    .resp, .resp_b
  );
  dual_ff_storage #(.DUAL(1'b0)) dut1 (
    .clk, .capture, .q_in, .qb_in, .set_q, .rst_q, .set_qb, .rst_qb,
    .resp(resp1), .resp_b(resp1_b)
  );

  initial begin
    capture = 0; set_q = 0; rst_q = 1; set_qb = 1; rst_qb = 1; q_in = 0; qb_in = 0;
    @(negedge clk);
    m_q = 0; m_qb = 1;
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(0, 1)) begin
        // initialise: reset with a random set on each
        rst_q = 1; rst_qb = 1; capture = 0;
        set_q = 1'($urandom); set_qb = 1'($urandom);
        m_q = set_q; m_qb = set_qb;
      end else begin
        rst_q = 0; rst_qb = 0; set_q = 0; set_qb = 0; capture = 1;
        q_in = 1'($urandom); qb_in = ~q_in;
        m_q = q_in; m_qb = qb_in;
      end
      @(negedge clk);
      checks += 4;
      if (resp   !== m_q)  failures++;
      if (resp_b !== m_qb) failures++;
      if (resp1  !== m_q)  failures++;
      if (resp1_b !== 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
