// misr_obfuscator: challenge obfuscation with a Multiple Input Signature
// Register (MISR).
//
// The external challenge C is never applied to the PUF directly. On a load the
// MISR is preset to the programmed nonce alpha and C is captured; then for
// CYCLES clocks the register shifts left with Galois feedback (polynomial
// POLY) while C is XORed into all N bits in parallel. The final state is the
// obfuscated challenge C-hat, which stays registered and drives the PUF
// switches until the next load. C-hat is a fixed function of C and alpha
// (so a verifier knowing alpha can recompute it), but the feedback mixes every
// challenge bit into many C-hat bits, which defeats a model trained on
// external challenges. The source gives the MISR, the nonce and the registered
// C-hat; presetting with alpha, XORing C each cycle and CYCLES=N are this
// design's reading.
//
// Interface: nonce_we writes the nonce (programming). load starts an
// obfuscation when not busy; busy is high for CYCLES clocks and ready goes
// high when chat is valid, staying high until the next load.
module misr_obfuscator
  import copuf_pkg::*;
#(
  parameter int unsigned  N      = 64,
  parameter logic [N-1:0] POLY   = N'(misr_poly(N)),
  parameter int unsigned  CYCLES = N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         nonce_we,
  input  logic [N-1:0] nonce,
  input  logic         load,
  input  logic [N-1:0] chal,
  output logic [N-1:0] chat,
  output logic         busy,
  output logic         ready
);

  localparam int unsigned CW = $clog2(CYCLES + 1);

  logic [N-1:0]  alpha_q;
  logic [N-1:0]  chal_q;
  logic [N-1:0]  state_q;
  logic [CW-1:0] cnt_q;
  logic          valid_q;

  function automatic logic [N-1:0] step(input logic [N-1:0] s, input logic [N-1:0] in);
    return {s[N-2:0], 1'b0} ^ (s[N-1] ? POLY : '0) ^ in;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alpha_q <= '0;
    end else if (nonce_we) begin
      alpha_q <= nonce;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chal_q  <= '0;
      state_q <= '0;
      cnt_q   <= '0;
      valid_q <= 1'b0;
    end else if (load && !busy) begin
      chal_q  <= chal;
      state_q <= alpha_q;
      cnt_q   <= CW'(CYCLES);
      valid_q <= 1'b0;
    end else if (busy) begin
      state_q <= step(state_q, chal_q);
      cnt_q   <= cnt_q - 1'b1;
      if (cnt_q == CW'(1)) valid_q <= 1'b1;
    end
  end

  assign busy  = (cnt_q != '0);
  assign ready = valid_q;
  assign chat  = state_q;

endmodule
