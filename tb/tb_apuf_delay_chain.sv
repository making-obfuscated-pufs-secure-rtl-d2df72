// tb_apuf_delay_chain: checks the arrival times of a 64-stage chain against a
// stage-by-stage race computed here, and that two dies (seeds) differ.
module tb_apuf_delay_chain;
  import copuf_pkg::*;

  localparam int unsigned N = 64;
  localparam logic [31:0] SEED_A = 32'h0000_1234;
  localparam logic [31:0] SEED_B = 32'h0bad_cafe;

  logic [N-1:0] ch;
  fs_t ta, ba, tb2, bb2;
  int  checks = 0, failures = 0;
  int  differ = 0;

  apuf_delay_chain #(.N(N), .DIE_SEED(SEED_A)) dut_a (.challenge(ch), .t_top(ta), .t_bot(ba));
  apuf_delay_chain #(.N(N), .DIE_SEED(SEED_B)) dut_b (.challenge(ch), .t_top(tb2), .t_bot(bb2));

  task automatic race(input logic [31:0] seed, input logic [N-1:0] c,
                      output longint top, output longint bot);
    longint t, b, nt, nb;
    t = 0; b = 0;
    for (int i = 0; i < N; i++) begin
      if (c[i]) begin
        nt = b + stage_delay_fs(seed, i, 2);
        nb = t + stage_delay_fs(seed, i, 3);
      end else begin
        nt = t + stage_delay_fs(seed, i, 0);
        nb = b + stage_delay_fs(seed, i, 1);
      end
      t = nt; b = nb;
    end
    top = t; bot = b;
  endtask

  initial begin
    longint rt, rb;
    for (int i = 0; i < 300; i++) begin
      ch = {$urandom, $urandom};
      if (i == 0) ch = '0;
      if (i == 1) ch = '1;
      #1;
      race(SEED_A, ch, rt, rb);
      checks += 2;
      if (longint'(ta) != rt) failures++;
      if (longint'(ba) != rb) failures++;
      // Every path of N stages is near N times the nominal delay.
      checks++;
      if (rt < longint'(N) * 17000 || rt > longint'(N) * 23000) failures++;
      if ((ta < ba) != (tb2 < bb2)) differ++;
    end
    // Two dies should give different responses to a good share of challenges.
    checks++;
    if (differ < 30) failures++;
    $display("dies differ on %0d of 300 challenges", differ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
