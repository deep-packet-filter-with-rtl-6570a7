// prefix_match: prefix match module of a ROM based filter.
//
// Every pattern of the set starts with a one-word (4-byte) prefix. Each
// prefix is matched at every alignment a = 0..3 the same way a pattern is
// matched in the RDL filter: lanes a..3 of word t are compared with prefix
// characters 0..3-a and the result is registered; lanes 0..a-1 of word t+1
// are compared with characters 4-a..3 and ANDed with it. For a = 0 the whole
// prefix is in word t and only the registered result is used. The set is
// chosen so that at most one (prefix, alignment) pair can hit in a cycle, so
// no priority logic is needed: the per-prefix alignments are simply ORed into
// the byte alignment, and the one-hot prefix hits are turned into the suffix
// index by an OR encoder. Elaboration stops if the set breaks the rules (a
// prefix that overlaps itself, two equal or mutually overlapping prefixes).
//
// Interface: dec is the decoded current word. hit/align/index are the
// registered result: index selects the suffix entry, align is the lane of
// the word after the prefix's first word at which the suffix begins.
// Timing: the result for a prefix that starts in word t (sampled by the
// caller into dec at cycle t) is valid in cycle t+2, while word t+2 is on dec.
//
// Exact prefix matching per alignment, the OR of alignments and the
// non-priority index encoder follow the published architecture; the output
// registers, the elaboration checks and the assertion are choices made here.
module prefix_match
  import dpf_pkg::*;
#(
  parameter int unsigned             NP     = 4,
  parameter prefix_t [NP-1:0]        PREFIX = {str4("root"), str4("/bin"),
                                               str4("xp_c"), str4("/etc")},
  localparam int unsigned            IW     = addr_w(NP)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  lane_dec_t              dec,
  output logic                   hit,
  output logic [1:0]             align,
  output logic [IW-1:0]          index
);
  // Rule check over the whole set.
  function automatic bit set_ok();
    for (int unsigned i = 0; i < NP; i++) begin
      if (!prefix_self_ok(PREFIX[i])) return 1'b0;
      for (int unsigned k = i + 1; k < NP; k++)
        if (!prefix_pair_ok(PREFIX[i], PREFIX[k])) return 1'b0;
    end
    return 1'b1;
  endfunction

  if (!set_ok()) begin : g_bad_set
    $error("prefix_match: prefix set breaks the ROM partitioning rules");
  end

  logic [NP-1:0][BUS_BYTES-1:0] first_d, first_q;  // stage 1 per prefix/alignment
  logic [NP-1:0][BUS_BYTES-1:0] hit_a;              // full prefix hit
  logic [NP-1:0]                hit_p;
  logic [1:0]                   align_d;
  logic [IW-1:0]                index_d;

  always_comb begin
    for (int unsigned i = 0; i < NP; i++)
      for (int unsigned a = 0; a < BUS_BYTES; a++) begin
        first_d[i][a] = 1'b1;
        for (int unsigned l = a; l < BUS_BYTES; l++)
          first_d[i][a] = first_d[i][a] & dec[l][PREFIX[i][l - a]];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) first_q <= '0;
    else        first_q <= first_d;
  end

  always_comb begin
    for (int unsigned i = 0; i < NP; i++)
      for (int unsigned a = 0; a < BUS_BYTES; a++) begin
        hit_a[i][a] = first_q[i][a];
        for (int unsigned l = 0; l < a; l++)
          hit_a[i][a] = hit_a[i][a] & dec[l][PREFIX[i][BUS_BYTES - a + l]];
      end
  end

  // Alignment encoders and OR, suffix index encoder.
  always_comb begin
    align_d = '0;
    index_d = '0;
    for (int unsigned i = 0; i < NP; i++) begin
      hit_p[i] = |hit_a[i];
      align_d  = align_d | {hit_a[i][3] | hit_a[i][2], hit_a[i][3] | hit_a[i][1]};
      if (hit_p[i]) index_d = index_d | IW'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit   <= 1'b0;
      align <= '0;
      index <= '0;
    end else begin
      hit   <= |hit_p;
      align <= align_d;
      index <= index_d;
    end
  end

  // The set rules guarantee that no two prefix/alignment pairs hit together.
  a_single_hit: assert property (@(posedge clk) disable iff (!rst_n) $countones(hit_a) <= 1)
    else $error("prefix_match: more than one prefix hit in one cycle");
endmodule
