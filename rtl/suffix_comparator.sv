// suffix_comparator: lines the incoming data up with the suffix read from
// ROM and compares the two.
//
// The data words that follow a prefix are kept in a pipeline of NW-1 word
// registers; together with the current word they form a window of 4*NW
// bytes in stream order (oldest word first). When a lookup is presented,
// the window is shifted by the byte alignment with a single level of
// multiplexers, so that window byte align+k faces suffix character k. The
// suffix length from the ROM entry is decoded into a byte mask and only the
// valid bytes are compared (XNOR per bit, AND over the valid bytes). A
// suffix of length 0 matches as soon as its prefix did.
//
// Interface: in_word is the current stream word; en/align/idx describe a
// lookup whose suffix begins at lane align of the oldest word in the window;
// suf/suf_len come from the ROM in the same cycle. match/match_idx are
// registered.
// Timing: match is valid one clock edge after en. NW must satisfy
// 4*NW >= MAXS+3 so the longest suffix at alignment 3 fits.
//
// The data pipeline, one-level multiplexer shifter and length-masked
// compare follow the published architecture; the output register and the
// window arithmetic are choices made here.
module suffix_comparator
  import dpf_pkg::*;
#(
  parameter int unsigned MAXS = 12,
  parameter int unsigned LB   = 4,
  parameter int unsigned NW   = 4,
  parameter int unsigned IW   = 9
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  word_t                in_word,
  input  logic                 en,
  input  logic [1:0]           align,
  input  logic [IW-1:0]        idx,
  input  logic [MAXS-1:0][7:0] suf,
  input  logic [LB-1:0]        suf_len,
  output logic                 match,
  output logic [IW-1:0]        match_idx
);
  localparam int unsigned WB = BUS_BYTES * NW;

  if (WB < MAXS + BUS_BYTES - 1) begin : g_bad_nw
    $error("suffix_comparator: window too short for the longest suffix");
  end

  word_t [NW-1:0]         pipe;     // pipe[0] = current word, pipe[NW-1] oldest
  logic  [WB-1:0][7:0]    window;   // stream order, [0] = oldest byte
  logic  [MAXS-1:0][7:0]  lined;
  logic  [MAXS-1:0]       byte_ok;
  logic                   eq;

  assign pipe[0] = in_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned w = 1; w < NW; w++) pipe[w] <= '0;
    end else begin
      for (int unsigned w = 1; w < NW; w++) pipe[w] <= pipe[w-1];
    end
  end

  always_comb begin
    for (int unsigned b = 0; b < WB; b++)
      window[b] = pipe[NW - 1 - b / BUS_BYTES][b % BUS_BYTES];
  end

  // Shifter: one level of 4-to-1 multiplexers per suffix byte.
  always_comb begin
    for (int unsigned k = 0; k < MAXS; k++)
      unique case (align)
        2'd0: lined[k] = window[k];
        2'd1: lined[k] = window[k + 1];
        2'd2: lined[k] = window[k + 2];
        default: lined[k] = window[k + 3];
      endcase
  end

  // Length-masked bit-wise compare.
  always_comb begin
    for (int unsigned k = 0; k < MAXS; k++)
      byte_ok[k] = (k >= suf_len) || (&(lined[k] ~^ suf[k]));
    eq = &byte_ok;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match     <= 1'b0;
      match_idx <= '0;
    end else begin
      match     <= en & eq;
      match_idx <= idx;
    end
  end
endmodule
