// tb_misr_obfuscator: checks C-hat against a signature computed here, the
// obfuscation latency (CYCLES clocks), that C-hat differs from C, and that a
// new nonce changes C-hat.
module tb_misr_obfuscator;
  localparam int unsigned N = 64;
  localparam logic [63:0] POLY = 64'h1B;

  logic clk = 0, rst_n, nonce_we, load, busy, ready;
  logic [N-1:0] nonce, chal, chat, expect_chat, alpha;
  int   checks = 0, failures = 0, lat;

  always #5 clk = ~clk;

  misr_obfuscator #(.N(N)) dut (.clk, .rst_n, .nonce_we, .nonce, .load,
                                .chal, .chat, .busy, .ready);

  function automatic logic [N-1:0] sig(input logic [N-1:0] a, input logic [N-1:0] c);
    logic [N-1:0] s;
    s = a;
    for (int k = 0; k < N; k++) begin
      if (s[N-1]) s = (s << 1) ^ POLY ^ c;
      else        s = (s << 1) ^ c;
    end
    return s;
  endfunction

  initial begin
    rst_n = 0; nonce_we = 0; load = 0; nonce = '0; chal = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      if (i % 20 == 0) begin
        alpha = {$urandom, $urandom};
        nonce = alpha; nonce_we = 1;
        @(negedge clk);
        nonce_we = 0;
      end
      chal = {$urandom, $urandom};
      load = 1;
      @(negedge clk);
      load = 0;
      lat = 0;   // clocks counted from the load edge
      while (!ready) begin
        @(negedge clk);
        lat++;
        if (lat > 1000) break;
      end
      expect_chat = sig(alpha, chal);
      checks += 3;
      if (chat !== expect_chat) failures++;
      if (lat != N) begin failures++; $display("latency %0d", lat); end
      if (chat === chal) failures++;
      // a load while busy is ignored; C-hat holds while idle
      repeat (3) @(negedge clk);
      checks++;
      if (chat !== expect_chat || busy) failures++;
    end
    // same challenge, different nonce: different C-hat
    chal = 64'h0123_4567_89ab_cdef;
    nonce = 64'h1; nonce_we = 1; @(negedge clk); nonce_we = 0;
    load = 1; @(negedge clk); load = 0;
    wait (ready); @(negedge clk);
    expect_chat = chat;
    nonce = 64'h2; nonce_we = 1; @(negedge clk); nonce_we = 0;
    load = 1; @(negedge clk); load = 0;
    wait (ready); @(negedge clk);
    checks += 2;
    if (chat === expect_chat) failures++;
    if (chat !== sig(64'h2, chal)) failures++;
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
