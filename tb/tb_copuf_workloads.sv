// tb_copuf_workloads: the configurations evaluated for the protected PUF,
// each run for 15,000 random challenges: the unprotected CO-PUF at 16, 24
// and 64 bits, and the 64-bit CO-PUF with the dual flip-flop, the randomized
// response setting and both (hybrid). Each instance is a different die.
module tb_copuf_workloads;
  import copuf_pkg::*;

  localparam int Q = 15000;

  logic d[6];
  int   c[6], f[6];
  int   checks, failures;

  copuf_harness #(.N(16), .MITIGATION(MIT_NONE),    .QUERIES(Q), .SEED(32'h11)) h0 (d[0], c[0], f[0]);
  copuf_harness #(.N(24), .MITIGATION(MIT_NONE),    .QUERIES(Q), .SEED(32'h22)) h1 (d[1], c[1], f[1]);
  copuf_harness #(.N(64), .MITIGATION(MIT_NONE),    .QUERIES(Q), .SEED(32'h33)) h2 (d[2], c[2], f[2]);
  copuf_harness #(.N(64), .MITIGATION(MIT_DUAL_FF), .QUERIES(Q), .SEED(32'h44)) h3 (d[3], c[3], f[3]);
  copuf_harness #(.N(64), .MITIGATION(MIT_RAND),    .QUERIES(Q), .SEED(32'h55)) h4 (d[4], c[4], f[4]);
  copuf_harness #(.N(64), .MITIGATION(MIT_HYBRID),  .QUERIES(Q), .SEED(32'h66)) h5 (d[5], c[5], f[5]);

  initial begin
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    checks = 0; failures = 0;
    for (int i = 0; i < 6; i++) begin
      checks += c[i];
      failures += f[i];
      if (f[i] != 0) $display("configuration %0d: %0d failures", i, f[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(Q * 100 * 1ns + 10us);
    checks = 0; failures = 1;
    for (int i = 0; i < 6; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
