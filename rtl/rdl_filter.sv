// rdl_filter: parallel reconfigurable-discrete-logic pattern filter.
//
// The 32-bit input word is registered, then decoded once per byte lane by
// shared 8-to-256 decoders. One rdl_pattern_matcher per pattern watches the
// decoded word at all four alignments, and all of them run in parallel, so
// the filter accepts a word every clock whatever the number or length of
// the patterns. The per-pattern flags feed a pruned priority tree encoder,
// which reports the highest-numbered pattern that matched; its root OR is
// the "malicious packet" alert.
//
// Interface: in_word (lane 0 first in stream), one word per clock, no
// stalls. flags are the per-pattern match flags, alert/idx the encoded
// result.
// Timing: a pattern whose last character is in the word sampled at clock
// edge E shows on flags after edge E+2 and on alert/idx after edge E+3.
//
// The structure (input register, shared decoders, parallel matchers,
// priority encoder) follows the published architecture; the stall-free
// stream, byte order and reset are choices made here.
module rdl_filter
  import dpf_pkg::*;
#(
  parameter int unsigned                      N      = 5,
  parameter int unsigned                      MAXLEN = 16,
  parameter logic [N-1:0][MAXLEN-1:0][7:0]    PAT    = {128'("%c0%af"), 128'("ABAB"),
                                                        128'("BABAB"), 128'("ABCDE"),
                                                        128'("ABC")},
  parameter logic [N-1:0][7:0]                LEN    = {8'd6, 8'd4, 8'd5, 8'd5, 8'd3},
  localparam int unsigned                     AW     = addr_w(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  word_t         in_word,
  output logic [N-1:0]  flags,
  output logic          alert,
  output logic [AW-1:0] idx
);
  word_t     word_q;
  lane_dec_t dec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) word_q <= '0;
    else        word_q <= in_word;
  end

  byte_decoder #(.LANES(BUS_BYTES)) u_dec (.data(word_q), .dec(dec));

  for (genvar i = 0; i < N; i++) begin : g_pat
    rdl_pattern_matcher #(
      .MAXLEN (MAXLEN),
      .LEN    (int'(LEN[i])),
      .PAT    (PAT[i])
    ) u_match (
      .clk   (clk),
      .rst_n (rst_n),
      .dec   (dec),
      .match (flags[i])
    );
  end

  priority_encoder #(.N(N)) u_enc (
    .clk   (clk),
    .rst_n (rst_n),
    .flags (flags),
    .idx   (idx),
    .any   (alert)
  );
endmodule
