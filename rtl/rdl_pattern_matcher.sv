// rdl_pattern_matcher: 4-byte inspection module for one pattern.
//
// The pattern may begin at any of the four byte lanes of a bus word, so the
// module holds one pipelined comparator chain per alignment a = 0..3. For
// alignment a, character j of the pattern is expected in word (a+j)/4 after
// the starting word, lane (a+j)%4. Stage s of the chain ANDs the decoder bits
// of the characters that fall into word s; its result is stored in a 1-bit
// register that enables stage s+1 on the next word. The register behind the
// last stage of a chain says "pattern seen at this alignment"; the four are
// ORed into a 1-bit match register. Character comparisons use the shared
// byte decoders, so a stage is only an AND gate over decoder bits, and
// identical stage terms of different patterns are plain common logic.
//
// Interface: dec is the decoded current word (see byte_decoder); match is a
// registered 1-bit flag.
// Timing: match rises two clock edges after the word that holds the last
// character of the pattern is on dec, and stays high for one cycle per
// occurrence. Accepts a new word every clock.
//
// The per-alignment chains with 1-bit enable registers and the final match
// register follow the published architecture; the reset and the use of
// decoder bits instead of private comparators are choices made here.
module rdl_pattern_matcher
  import dpf_pkg::*;
#(
  parameter int unsigned               MAXLEN = 16,
  parameter int unsigned               LEN    = 3,
  parameter logic [MAXLEN-1:0][7:0]    PAT    = 128'("ABC")
) (
  input  logic       clk,
  input  logic       rst_n,
  input  lane_dec_t  dec,
  output logic       match
);
  // Number of pipeline stages the longest alignment (a = 3) needs.
  localparam int unsigned NS = cdiv(LEN + BUS_BYTES - 1, BUS_BYTES);

  // Character j of the pattern.
  function automatic byte_t ch(input int unsigned j);
    return PAT[LEN - 1 - j];
  endfunction

  // Last stage used by alignment a.
  function automatic int unsigned last_stage(input int unsigned a);
    return (a + LEN - 1) / BUS_BYTES;
  endfunction

  logic [BUS_BYTES-1:0][NS-1:0] cmp;    // segment comparators, per stage
  logic [BUS_BYTES-1:0][NS-1:0] stage_q; // enable registers between stages
  logic [BUS_BYTES-1:0]         seen;    // chain end per alignment

  always_comb begin
    for (int unsigned a = 0; a < BUS_BYTES; a++)
      for (int unsigned s = 0; s < NS; s++) begin
        cmp[a][s] = 1'b1;
        for (int unsigned j = 0; j < LEN; j++)
          if ((a + j) / BUS_BYTES == s)
            cmp[a][s] = cmp[a][s] & dec[(a + j) % BUS_BYTES][ch(j)];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q <= '0;
    end else begin
      for (int unsigned a = 0; a < BUS_BYTES; a++)
        for (int unsigned s = 0; s < NS; s++)
          stage_q[a][s] <= (s == 0) ? cmp[a][0] : (stage_q[a][s-1] & cmp[a][s]);
    end
  end

  always_comb begin
    for (int unsigned a = 0; a < BUS_BYTES; a++)
      seen[a] = stage_q[a][last_stage(a)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) match <= 1'b0;
    else        match <= |seen;
  end

  if (LEN < 1 || LEN > MAXLEN) begin : g_bad_len
    $error("rdl_pattern_matcher: LEN must be 1..MAXLEN");
  end
endmodule
