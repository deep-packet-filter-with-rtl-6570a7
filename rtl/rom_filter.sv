// rom_filter: read-only-memory based inspection unit for one pattern set.
//
// Each pattern is split into a one-word prefix (its first 4 characters) and
// a suffix (the rest). The prefixes are matched in logic by prefix_match,
// which also reports the lane at which the suffix begins. The number of the
// prefix that hit is used directly as the address of a ROM that holds every
// suffix together with its length. The incoming words meanwhile travel down
// a data pipeline, and suffix_comparator lines them up with the suffix at
// the reported alignment and compares the valid bytes. On a match, the ROM
// address, i.e. the number of the pattern within the set, is the output.
//
// ROM entry layout (DW bits): bits LB-1:0 hold the suffix length in bytes,
// bits LB+8k+7:LB+8k hold suffix character k, unused bits are zero. With
// FOLD = 1 the ROM is a folded_rom with one extra bit of width, which halves
// the number of rows when even/odd entries fit in one row.
//
// The pattern set must meet the partitioning rules: every pattern longer
// than one word, and prefixes that can never be seen at two alignments or
// two at a time (checked during elaboration in prefix_match).
//
// Interface: in_word, one word per clock, no stalls; match/idx out.
// Timing: a pattern whose first character is in the word sampled at edge E
// is reported right after edge E+NW+1, with NW = max(3, ceil((MAXLEN-1)/4))
// words of data pipeline; the prefix result is delayed by NW-3 cycles before
// the ROM read so that the ROM output meets the last data word.
//
// The datapath (prefix match, ROM, multiplexed pipeline, comparator)
// follows the published architecture; the entry layout, where the lookup
// delay sits and the pipeline depth formula are choices made here.
module rom_filter
  import dpf_pkg::*;
#(
  parameter int unsigned                   N      = 4,
  parameter int unsigned                   MAXLEN = 16,
  parameter logic [N-1:0][MAXLEN-1:0][7:0] PAT    = {128'("root.exe"), 128'("/bin/sh"),
                                                     128'("xp_cmdshell"), 128'("/etc/passwd")},
  parameter logic [N-1:0][7:0]             LEN    = {8'd8, 8'd7, 8'd11, 8'd11},
  parameter bit                            FOLD   = 1'b1,
  localparam int unsigned                  IW     = addr_w(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  word_t         in_word,
  output logic          match,
  output logic [IW-1:0] idx
);
  localparam int unsigned MAXS  = MAXLEN - BUS_BYTES;
  localparam int unsigned LB    = $clog2(MAXS + 1);
  localparam int unsigned DW    = LB + 8 * MAXS + (FOLD ? 1 : 0);
  localparam int unsigned DEPTH = 1 << IW;
  localparam int unsigned NWR   = cdiv(MAXS + BUS_BYTES - 1, BUS_BYTES);
  localparam int unsigned NW    = (NWR < 3) ? 3 : NWR;
  localparam int unsigned DLY   = NW - 3;

  // Character j of pattern i.
  function automatic byte_t ch(input int unsigned i, input int unsigned j);
    return PAT[i][int'(LEN[i]) - 1 - int'(j)];
  endfunction

  function automatic prefix_t [N-1:0] prefixes();
    prefix_t [N-1:0] p;
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned j = 0; j < BUS_BYTES; j++) p[i][j] = ch(i, j);
    return p;
  endfunction

  function automatic logic [DEPTH-1:0][DW-1:0] entries();
    logic [DEPTH-1:0][DW-1:0] e;
    e = '0;
    for (int unsigned i = 0; i < N; i++) begin
      e[i][LB-1:0] = LB'(LEN[i] - BUS_BYTES);
      for (int unsigned k = 0; k + BUS_BYTES < int'(LEN[i]); k++)
        e[i][LB + 8*k +: 8] = ch(i, BUS_BYTES + k);
    end
    return e;
  endfunction

  function automatic bit lengths_ok();
    for (int unsigned i = 0; i < N; i++)
      if (int'(LEN[i]) <= int'(BUS_BYTES) || int'(LEN[i]) > int'(MAXLEN)) return 1'b0;
    return 1'b1;
  endfunction

  if (!lengths_ok()) begin : g_bad_len
    $error("rom_filter: every pattern must be longer than one word and fit MAXLEN");
  end

  localparam prefix_t [N-1:0]          PREFIX  = prefixes();
  localparam logic [DEPTH-1:0][DW-1:0] CONTENT = entries();

  word_t         word_q;
  lane_dec_t     dec;
  logic          p_hit;
  logic [1:0]    p_align;
  logic [IW-1:0] p_index;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) word_q <= '0;
    else        word_q <= in_word;
  end

  byte_decoder #(.LANES(BUS_BYTES)) u_dec (.data(word_q), .dec(dec));

  prefix_match #(.NP(N), .PREFIX(PREFIX)) u_prefix (
    .clk   (clk),
    .rst_n (rst_n),
    .dec   (dec),
    .hit   (p_hit),
    .align (p_align),
    .index (p_index)
  );

  // Delay the lookup so that the ROM output arrives with the last data word.
  typedef struct packed {
    logic          hit;
    logic [1:0]    align;
    logic [IW-1:0] index;
  } lookup_t;

  lookup_t look [DLY+2];   // look[0] = prefix result, look[DLY] = ROM address
  lookup_t look_c;         // lookup aligned with the ROM output

  assign look[0] = '{hit: p_hit, align: p_align, index: p_index};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned d = 1; d <= DLY + 1; d++) look[d] <= '0;
    end else begin
      for (int unsigned d = 1; d <= DLY + 1; d++) look[d] <= look[d-1];
    end
  end

  assign look_c = look[DLY+1];

  logic [DW-1:0] entry;

  if (FOLD) begin : g_folded
    folded_rom #(.DEPTH(DEPTH), .DW(DW), .CONTENT(CONTENT)) u_rom (
      .clk (clk), .addr (look[DLY].index), .data (entry));
  end else begin : g_plain
    suffix_rom #(.DEPTH(DEPTH), .DW(DW), .CONTENT(CONTENT)) u_rom (
      .clk (clk), .addr (look[DLY].index), .data (entry));
  end

  suffix_comparator #(.MAXS(MAXS), .LB(LB), .NW(NW), .IW(IW)) u_cmp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_word   (word_q),
    .en        (look_c.hit),
    .align     (look_c.align),
    .idx       (look_c.index),
    .suf       (entry[LB +: 8*MAXS]),
    .suf_len   (entry[LB-1:0]),
    .match     (match),
    .match_idx (idx)
  );
endmodule
