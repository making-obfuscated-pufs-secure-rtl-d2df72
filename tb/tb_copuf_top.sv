// tb_copuf_top: end-to-end test of the protected CO-PUF at its default size
// (64-bit challenge, hybrid countermeasure).
//
// Every query goes through the full sequence: load the challenge, wait for
// the obfuscated challenge, initialise the response flip-flops, launch the
// race, capture the response. A reference computed here predicts C-hat (the
// MISR signature of the nonce and challenge), the race outcome from the
// per-die stage delays, and the pseudo-random initial value, and the test
// checks the response pair after initialisation and after capture.
// It counts how often each mechanism occurs and fails if one never does:
// obfuscation changing the challenge, random initialisation to 1 and to 0,
// a capture that flips the initialised flip-flop and one that leaves it,
// responses 0 and 1, a nonce change, and the latch's pre-race state.
module tb_copuf_top;
  import copuf_pkg::*;

  localparam int unsigned N       = 64;
  localparam logic [63:0] POLY    = 64'h1B;
  localparam logic [31:0] SEED    = 32'h0000_1234;
  localparam longint      CLK_FS  = 1_000_000;
  localparam int          QUERIES = 2000;

  logic clk = 0, rst_n, nonce_we, chal_load, chal_ready, init, launch, capture;
  logic [N-1:0] nonce, challenge;
  logic response, response_b;

  int checks = 0, failures = 0;
  int n_obf = 0, n_init1 = 0, n_init0 = 0, n_flip = 0, n_keep = 0;
  int n_resp1 = 0, n_resp0 = 0, n_nonce = 0, n_prerace = 0;

  always #500ps clk = ~clk;

  copuf_top dut (
    .clk, .rst_n, .nonce_we, .nonce, .chal_load, .challenge, .chal_ready,
    .init, .launch, .capture, .response, .response_b
  );

  logic [N-1:0] alpha;
  logic [15:0]  lfsr;

  function automatic logic [N-1:0] sig(input logic [N-1:0] a, input logic [N-1:0] c);
    logic [N-1:0] s;
    s = a;
    for (int k = 0; k < N; k++) s = (s << 1) ^ (s[N-1] ? POLY : '0) ^ c;
    return s;
  endfunction

  task automatic race(input logic [N-1:0] c, output longint top, output longint bot);
    longint t, b, nt, nb;
    t = 0; b = 0;
    for (int i = 0; i < N; i++) begin
      nt = c[i] ? b + stage_delay_fs(SEED, i, 2) : t + stage_delay_fs(SEED, i, 0);
      nb = c[i] ? t + stage_delay_fs(SEED, i, 3) : b + stage_delay_fs(SEED, i, 1);
      t = nt; b = nb;
    end
    top = t; bot = b;
  endtask

  task automatic query(input logic [N-1:0] c, input bit early);
    logic [N-1:0] chat;
    longint tt, tbot, tmax;
    logic rb, fb, exp_q;
    int lat, settle;
    // 1. challenge
    challenge = c; chal_load = 1;
    @(negedge clk);
    chal_load = 0;
    lat = 0;
    while (!chal_ready && lat < 1000) begin @(negedge clk); lat++; end
    chat = sig(alpha, c);
    checks++;
    if (lat != N) begin failures++; $display("MISR latency %0d", lat); end
    if (chat != c) n_obf++;
    // 2. random initialisation, seeded with C-hat[0]
    fb = lfsr[15] ^ lfsr[14] ^ lfsr[12] ^ lfsr[3] ^ chat[0];
    lfsr = {lfsr[14:0], fb};
    rb = fb;
    init = 1;
    @(negedge clk);
    init = 0;
    checks += 2;
    if (response !== rb) failures++;
    if (response_b !== ~rb) failures++;
    if (rb) n_init1++; else n_init0++;
    // 3. launch
    race(chat, tt, tbot);
    exp_q = (tbot < tt);
    tmax = (tt > tbot) ? tt : tbot;
    settle = int'((tmax + CLK_FS - 1) / CLK_FS);
    launch = 1;
    if (early) begin
      // capture before any edge has reached the latch: both outputs high
      capture = 1;
      @(negedge clk);
      capture = 0;
      checks++;
      if ({response, response_b} !== 2'b11) failures++;
      n_prerace++;
      settle = settle - 1;
    end
    repeat (settle) @(negedge clk);
    // 4. capture
    capture = 1;
    @(negedge clk);
    capture = 0;
    launch = 0;
    checks += 2;
    if (response !== exp_q) failures++;
    if (response_b !== ~exp_q) failures++;
    if (exp_q) n_resp1++; else n_resp0++;
    if (exp_q != rb) n_flip++; else n_keep++;
    @(negedge clk);
  endtask

  initial begin
    rst_n = 0; nonce_we = 0; chal_load = 0; init = 0; launch = 0; capture = 0;
    nonce = '0; challenge = '0;
    lfsr = 16'hACE1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < QUERIES; i++) begin
      if (i % 500 == 0) begin
        alpha = {$urandom, $urandom};
        nonce = alpha; nonce_we = 1;
        @(negedge clk);
        nonce_we = 0;
        n_nonce++;
      end
      query({$urandom, $urandom}, i == 7);
    end
    $display("obfuscated %0d init1 %0d init0 %0d flip %0d keep %0d resp1 %0d resp0 %0d nonce %0d prerace %0d",
             n_obf, n_init1, n_init0, n_flip, n_keep, n_resp1, n_resp0, n_nonce, n_prerace);
    checks += 9;
    if (n_obf == 0)     failures++;
    if (n_init1 == 0)   failures++;
    if (n_init0 == 0)   failures++;
    if (n_flip == 0)    failures++;
    if (n_keep == 0)    failures++;
    if (n_resp1 == 0)   failures++;
    if (n_resp0 == 0)   failures++;
    if (n_nonce < 2)    failures++;
    if (n_prerace == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (QUERIES * (N + 20) + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
