// copuf_harness: drives one copuf_top instance through QUERIES random
// challenges and checks every response against a reference computed here
// (MISR signature, race over the per-die stage delays, LFSR initial value).
//
// Besides correctness it checks the property each countermeasure is meant to
// give the response storage at the capture edge:
//   dual modes (MIT_DUAL_FF, MIT_HYBRID): the two flip-flops always switch in
//     opposite directions, so as many outputs rise as fall;
//   single modes (MIT_NONE, MIT_RAND): when the flip-flop switches, the
//     direction of the switch equals the response.
// It also reports how often the captured value differs from the value held
// before the capture, split by response, as a switching-activity summary.
module copuf_harness
  import copuf_pkg::*;
#(
  parameter int unsigned N          = 64,
  parameter mitigation_e MITIGATION = MIT_HYBRID,
  parameter int          QUERIES    = 15000,
  parameter logic [31:0] SEED       = 32'h0000_1234
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam longint CLK_FS = 1_000_000;
  localparam bit DUAL = (MITIGATION == MIT_DUAL_FF) || (MITIGATION == MIT_HYBRID);
  localparam bit RAND = (MITIGATION == MIT_RAND)    || (MITIGATION == MIT_HYBRID);

  logic clk = 0, rst_n, nonce_we, chal_load, chal_ready, init, launch, capture;
  logic [N-1:0] nonce, challenge;
  logic response, response_b;

  always #500ps clk = ~clk;

  copuf_top #(.N(N), .MITIGATION(MITIGATION), .DIE_SEED(SEED)) dut (
    .clk, .rst_n, .nonce_we, .nonce, .chal_load, .challenge, .chal_ready,
    .init, .launch, .capture, .response, .response_b
  );

  function automatic logic [N-1:0] poly();
    case (N)
      16:      return N'(64'h2D);
      24:      return N'(64'h87);
      64:      return N'(64'h1B);
      default: return N'(64'h03);
    endcase
  endfunction

  function automatic logic [N-1:0] sig(input logic [N-1:0] a, input logic [N-1:0] c);
    logic [N-1:0] s;
    s = a;
    for (int k = 0; k < N; k++) s = (s << 1) ^ (s[N-1] ? poly() : '0) ^ c;
    return s;
  endfunction

  function automatic logic [N-1:0] rand_chal();
    logic [N-1:0] c;
    for (int k = 0; k < N; k += 32) c = (c << 32) | N'($urandom);
    return c;
  endfunction

  logic [N-1:0] alpha;
  logic [15:0]  lfsr;
  int n_resp[2];
  int n_change[2];

  initial begin
    logic [N-1:0] c, chat;
    longint t, b, nt, nb, tmax;
    logic fb, rb, exp_q, pre_q, pre_qb;
    int lat;
    done = 0; checks = 0; failures = 0;
    n_resp = '{0, 0}; n_change = '{0, 0};
    rst_n = 0; nonce_we = 0; chal_load = 0; init = 0; launch = 0; capture = 0;
    nonce = '0; challenge = '0; lfsr = 16'hACE1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    alpha = rand_chal();
    nonce = alpha; nonce_we = 1;
    @(negedge clk);
    nonce_we = 0;
    for (int i = 0; i < QUERIES; i++) begin
      c = rand_chal();
      challenge = c; chal_load = 1;
      @(negedge clk);
      chal_load = 0;
      lat = 0;
      while (!chal_ready && lat < 1000) begin @(negedge clk); lat++; end
      chat = sig(alpha, c);
      checks++;
      if (lat != N) failures++;
      if (RAND) begin
        fb = lfsr[15] ^ lfsr[14] ^ lfsr[12] ^ lfsr[3] ^ chat[0];
        lfsr = {lfsr[14:0], fb};
        rb = fb;
        init = 1;
        @(negedge clk);
        init = 0;
        checks++;
        if (response !== rb || (DUAL && response_b !== ~rb)) failures++;
      end
      t = 0; b = 0;
      for (int s = 0; s < N; s++) begin
        nt = chat[s] ? b + stage_delay_fs(SEED, s, 2) : t + stage_delay_fs(SEED, s, 0);
        nb = chat[s] ? t + stage_delay_fs(SEED, s, 3) : b + stage_delay_fs(SEED, s, 1);
        t = nt; b = nb;
      end
      exp_q = (b < t);
      tmax = (t > b) ? t : b;
      launch = 1;
      repeat (int'((tmax + CLK_FS - 1) / CLK_FS)) @(negedge clk);
      pre_q = response; pre_qb = response_b;
      capture = 1;
      @(negedge clk);
      capture = 0;
      launch = 0;
      checks++;
      if (response !== exp_q || (DUAL && response_b !== ~exp_q)) failures++;
      n_resp[exp_q]++;
      if (pre_q != response) n_change[exp_q]++;
      // (without the random setting the flip-flops have no reset, so the
      // pair is complementary only from the first capture on)
      if (i > 0 || RAND) checks++;
      if (DUAL && (i > 0 || RAND)) begin
        // rising outputs must equal falling outputs
        if ((int'(!pre_q && response) + int'(!pre_qb && response_b)) !=
            (int'(pre_q && !response) + int'(pre_qb && !response_b))) failures++;
      end else if (!DUAL && (i > 0 || RAND)) begin
        if (pre_q != response && response != exp_q) failures++;
      end
      @(negedge clk);
    end
    $display("N=%0d %s: responses 0/1 = %0d/%0d, flip-flop switched on %0d of the 0s and %0d of the 1s",
             N, MITIGATION.name(), n_resp[0], n_resp[1], n_change[0], n_change[1]);
    // a working PUF gives both response values in reasonable proportion
    checks++;
    if (n_resp[0] < QUERIES / 5 || n_resp[1] < QUERIES / 5) failures++;
    done = 1;
  end

endmodule
