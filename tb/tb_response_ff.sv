// tb_response_ff: checks set-over-reset priority, reset, capture and hold.
module tb_response_ff;
  logic clk = 0, set, rst, en, d, q;
  logic model;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  response_ff dut (.clk(clk), .set(set), .rst(rst), .en(en), .d(d), .q(q));

  initial begin
    set = 1; rst = 1; en = 0; d = 0;
    @(negedge clk);
    checks++; if (q !== 1'b1) failures++;        // set wins over reset
    model = 1'b1;
    for (int i = 0; i < 500; i++) begin
      set = ($urandom_range(0, 3) == 0);
      rst = ($urandom_range(0, 3) == 0);
      en  = 1'($urandom);
      d   = 1'($urandom);
      @(negedge clk);
      if (set)      model = 1'b1;
      else if (rst) model = 1'b0;
      else if (en)  model = d;
      checks++;
      if (q !== model) failures++;
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
