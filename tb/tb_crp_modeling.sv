// tb_crp_modeling: challenge/response modelling attack on the same die with
// and without challenge obfuscation.
//
// A perceptron is trained on the standard linear delay model of an arbiter
// PUF: feature i is the product of (1 - 2*c_j) over stages j >= i, plus a
// bias. For the plain arbiter PUF (delay chain fed with C directly) the
// responses are a linear threshold of these features and the model predicts
// unseen challenges almost perfectly. For the obfuscated PUF (copuf_top, the
// same die seed) the chain sees C-hat instead, every feature of C-hat is a
// different parity of C, and the same model stays near guessing.
// 5000 training and 5000 test challenge/response pairs are used.
module tb_crp_modeling;
  import copuf_pkg::*;

  localparam int unsigned N      = 64;
  localparam int          NTRAIN = 5000;
  localparam int          NTEST  = 5000;
  localparam int          EPOCHS = 30;
  localparam longint      CLK_FS = 1_000_000;

  logic clk = 0, rst_n, nonce_we, chal_load, chal_ready, init, launch, capture;
  logic [N-1:0] nonce, challenge;
  logic response, response_b;
  fs_t  t_top, t_bot;

  int checks = 0, failures = 0;

  always #500ps clk = ~clk;

  // plain arbiter PUF: the chain sees the external challenge
  apuf_delay_chain #(.N(N), .DIE_SEED(32'h0000_1234)) plain (
    .challenge(challenge), .t_top(t_top), .t_bot(t_bot)
  );

  // obfuscated PUF of the same die, default configuration
  copuf_top dut (
    .clk, .rst_n, .nonce_we, .nonce, .chal_load, .challenge, .chal_ready,
    .init, .launch, .capture, .response, .response_b
  );

  logic [N-1:0] chal_set [NTRAIN + NTEST];
  logic         r_plain  [NTRAIN + NTEST];
  logic         r_obf    [NTRAIN + NTEST];

  function automatic void features(input logic [N-1:0] c, output int phi[N+1]);
    int p;
    p = 1;
    for (int i = N - 1; i >= 0; i--) begin
      p = c[i] ? -p : p;
      phi[i] = p;
    end
    phi[N] = 1;
  endfunction

  // Train on the first NTRAIN pairs, return the test accuracy in per mille.
  function automatic int attack(input bit use_obf);
    int w[N+1];
    int phi[N+1];
    longint s;
    int y, correct;
    foreach (w[i]) w[i] = 0;
    for (int e = 0; e < EPOCHS; e++) begin
      for (int k = 0; k < NTRAIN; k++) begin
        features(chal_set[k], phi);
        y = (use_obf ? r_obf[k] : r_plain[k]) ? 1 : -1;
        s = 0;
        for (int i = 0; i <= N; i++) s += longint'(w[i]) * phi[i];
        if ((s >= 0 ? 1 : -1) != y)
          for (int i = 0; i <= N; i++) w[i] += y * phi[i];
      end
    end
    correct = 0;
    for (int k = NTRAIN; k < NTRAIN + NTEST; k++) begin
      features(chal_set[k], phi);
      y = (use_obf ? r_obf[k] : r_plain[k]) ? 1 : -1;
      s = 0;
      for (int i = 0; i <= N; i++) s += longint'(w[i]) * phi[i];
      if ((s >= 0 ? 1 : -1) == y) correct++;
    end
    return (correct * 1000) / NTEST;
  endfunction

  initial begin
    int acc_plain, acc_obf, settle;
    rst_n = 0; nonce_we = 0; chal_load = 0; init = 0; launch = 0; capture = 0;
    nonce = '0; challenge = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    nonce = {$urandom, $urandom}; nonce_we = 1;
    @(negedge clk);
    nonce_we = 0;
    for (int k = 0; k < NTRAIN + NTEST; k++) begin
      chal_set[k] = {$urandom, $urandom};
      challenge = chal_set[k];
      #1ps;
      r_plain[k] = (t_bot < t_top);      // the arbiter's decision
      chal_load = 1;
      @(negedge clk);
      chal_load = 0;
      while (!chal_ready) @(negedge clk);
      init = 1;
      @(negedge clk);
      init = 0;
      launch = 1;
      settle = int'((N * 30000 + CLK_FS - 1) / CLK_FS);
      repeat (settle) @(negedge clk);
      capture = 1;
      @(negedge clk);
      capture = 0;
      launch = 0;
      r_obf[k] = response;
      checks++;
      if (response_b !== ~response) failures++;
      @(negedge clk);
    end
    acc_plain = attack(1'b0);
    acc_obf   = attack(1'b1);
    $display("CRP modelling accuracy: arbiter PUF %0d.%0d %%, obfuscated PUF %0d.%0d %%",
             acc_plain / 10, acc_plain % 10, acc_obf / 10, acc_obf % 10);
    checks += 2;
    if (acc_plain < 900) failures++;   // the plain PUF is learnable
    if (acc_obf > 650)   failures++;   // the obfuscated one is not
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NTRAIN + NTEST) * (N + 20) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
