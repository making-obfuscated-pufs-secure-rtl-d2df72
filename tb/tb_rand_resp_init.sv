// tb_rand_resp_init: compares the generator against an LFSR computed here,
// checks the set/reset encoding and that both random values occur.
module tb_rand_resp_init;
  logic clk = 0, rst_n, init, chat_lsb;
  logic rbit, set_q, rst_q, set_qb, rst_qb;
  logic [15:0] ref_lfsr;
  logic        fb, ref_bit;
  int   checks = 0, failures = 0, ones = 0, zeros = 0;

  always #5 clk = ~clk;

  rand_resp_init dut (.clk, .rst_n, .init, .chat_lsb, .rbit,
                      .set_q, .rst_q, .set_qb, .rst_qb);

  initial begin
    rst_n = 0; init = 0; chat_lsb = 0;
    ref_lfsr = 16'hACE1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      init = ($urandom_range(0, 2) != 0);
      chat_lsb = 1'($urandom);
      #1;
      // taps at bit positions 15, 14, 12 and 3
      fb = ref_lfsr[15] ^ ref_lfsr[14] ^ ref_lfsr[12] ^ ref_lfsr[3] ^ chat_lsb;
      ref_bit = fb;
      checks += 3;
      if (init) begin
        if (rbit !== ref_bit) failures++;
        if ({set_q, rst_q} !== {ref_bit, 1'b1}) failures++;
        if ({set_qb, rst_qb} !== {~ref_bit, 1'b1}) failures++;
        if (ref_bit) ones++; else zeros++;
      end else begin
        if ({set_q, rst_q, set_qb, rst_qb} !== 4'b0000) failures++;
        checks -= 2;
      end
      @(negedge clk);
      if (init) ref_lfsr = {ref_lfsr[14:0], fb};
    end
    checks++;
    if (ones < 200 || zeros < 200) failures++;
    $display("random ones=%0d zeros=%0d", ones, zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
