// deep_packet_filter: multi-pattern string search engine for packet payloads.
//
// One 32-bit word of payload enters per clock (lane 0 first) and is searched,
// at every byte alignment, for every pattern of the rule set. The rule set
// is split in two parts that run side by side on the same stream:
//  * ROM_SETS pattern sets that satisfy the ROM partitioning rules go to
//    rom_filter instances: prefix in logic, suffix in a ROM. Sets may use the
//    folded (higher utilisation) ROM, selected per set by ROM_FOLD.
//  * all remaining patterns go to one rdl_filter built purely from logic,
//    with a priority address encoder.
// Each filter reports its own match and pattern number; alert is the OR of
// all of them (the "malicious packet" flag). The filters have different
// latencies, so alert is not aligned to one stream position.
//
// The default pattern contents are short examples; a real deployment fills
// the parameters from its rule set. RDL patterns are numbered 0..RDL_N-1,
// ROM set s pattern k is reported as rom_idx[s] = k.
//
// Timing: see rdl_filter (alert/idx after edge E+3 when the word with the
// last character is sampled at edge E) and rom_filter (NW+1 edges after the word with the first
// character). alert is registered in addition, one edge later.
//
// Running an RDL filter for the rest of the rules beside ROM filters for the
// five largest valid sets, with the largest folded, follows the published
// design; the example contents and the alert register are choices made here.
module deep_packet_filter
  import dpf_pkg::*;
#(
  parameter int unsigned MAXLEN   = 16,
  // RDL part
  parameter int unsigned RDL_N    = 5,
  parameter logic [RDL_N-1:0][MAXLEN-1:0][7:0] RDL_PAT =
    {128'("%c0%af"), 128'("ABAB"), 128'("BABAB"), 128'("ABCDE"), 128'("ABC")},
  parameter logic [RDL_N-1:0][7:0] RDL_LEN = {8'd6, 8'd4, 8'd5, 8'd5, 8'd3},
  // ROM part: ROM_SETS sets of up to ROM_NMAX patterns, set 0 first
  parameter int unsigned ROM_SETS = 5,
  parameter int unsigned ROM_NMAX = 4,
  parameter logic [ROM_SETS-1:0][7:0] ROM_N = {8'd2, 8'd2, 8'd2, 8'd2, 8'd4},
  parameter logic [ROM_SETS-1:0][ROM_NMAX-1:0][MAXLEN-1:0][7:0] ROM_PAT = {
    {128'd0, 128'd0, 128'("passwd="),   128'("<script>")},
    {128'd0, 128'd0, 128'("chmod 777"), 128'("wget ")},
    {128'd0, 128'd0, 128'("PASS "),     128'("USER root")},
    {128'd0, 128'd0, 128'("GET /scripts"), 128'(".ida?")},
    {128'("/bin/sh"), 128'("root.exe"), 128'("xp_cmdshell"), 128'("/etc/passwd")}},
  parameter logic [ROM_SETS-1:0][ROM_NMAX-1:0][7:0] ROM_LEN = {
    {8'd0, 8'd0, 8'd7, 8'd8},
    {8'd0, 8'd0, 8'd9, 8'd5},
    {8'd0, 8'd0, 8'd5, 8'd9},
    {8'd0, 8'd0, 8'd12, 8'd5},
    {8'd7, 8'd8, 8'd11, 8'd11}},
  parameter logic [ROM_SETS-1:0] ROM_FOLD = 5'b00001,
  localparam int unsigned RDL_IW = addr_w(RDL_N),
  localparam int unsigned ROM_IW = addr_w(ROM_NMAX)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  word_t                             in_word,
  output logic [RDL_N-1:0]                  rdl_flags,
  output logic                              rdl_alert,
  output logic [RDL_IW-1:0]                 rdl_idx,
  output logic [ROM_SETS-1:0]               rom_match,
  output logic [ROM_SETS-1:0][ROM_IW-1:0]   rom_idx,
  output logic                              alert
);
  rdl_filter #(
    .N      (RDL_N),
    .MAXLEN (MAXLEN),
    .PAT    (RDL_PAT),
    .LEN    (RDL_LEN)
  ) u_rdl (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_word (in_word),
    .flags   (rdl_flags),
    .alert   (rdl_alert),
    .idx     (rdl_idx)
  );

  for (genvar s = 0; s < ROM_SETS; s++) begin : g_rom
    localparam int unsigned NS = int'(ROM_N[s]);
    localparam int unsigned IW = addr_w(NS);
    logic [IW-1:0] set_idx;

    rom_filter #(
      .N      (NS),
      .MAXLEN (MAXLEN),
      .PAT    (ROM_PAT[s][NS-1:0]),
      .LEN    (ROM_LEN[s][NS-1:0]),
      .FOLD   (ROM_FOLD[s])
    ) u_rom (
      .clk     (clk),
      .rst_n   (rst_n),
      .in_word (in_word),
      .match   (rom_match[s]),
      .idx     (set_idx)
    );

    assign rom_idx[s] = ROM_IW'(set_idx);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) alert <= 1'b0;
    else        alert <= rdl_alert | (|rom_match);
  end
endmodule
