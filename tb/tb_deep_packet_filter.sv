// tb_deep_packet_filter: end-to-end test of the complete filter with its
// default parameters: five RDL patterns and five ROM sets (set 0 folded).
// A random stream over the letters of all patterns carries planted
// patterns of every set and near misses (right prefix, wrong suffix). The
// reference search predicts, word by word:
//   RDL part: which patterns end in the word (rdl_flags 3 edges after the
//             word is applied, rdl_alert/rdl_idx 4 edges after, highest
//             number wins);
//   ROM set s: which pattern starts in the word (rom_match/rom_idx 6 edges
//             after the word is applied);
//   alert:    OR of all of the above, one edge later still.
// One word is applied per clock. Counted mechanisms that must all occur:
// RDL single and prioritised multiple matches, a match in every ROM set,
// ROM matches at all four alignments, even and odd entries of the folded
// ROM, near misses that hit a prefix but must not match.
module tb_deep_packet_filter;
  import dpf_pkg::*;
  localparam int NWORDS = 6000;
  localparam int LATF = 3, LATA = 4, LATR = 6;
  localparam int NR = 5, NSETS = 5;
  localparam string ALPH = "ABCDE%c0af/etpswdxp_mhlbinro.?GT USERPAchmod7<>=";

  string rdl [NR] = '{"ABC", "ABCDE", "BABAB", "ABAB", "%c0%af"};
  string romp [NSETS][4] = '{
    '{"/etc/passwd", "xp_cmdshell", "root.exe", "/bin/sh"},
    '{".ida?", "GET /scripts", "", ""},
    '{"USER root", "PASS ", "", ""},
    '{"wget ", "chmod 777", "", ""},
    '{"<script>", "passwd=", "", ""}};
  int romn [NSETS] = '{4, 2, 2, 2, 2};

  logic clk = 0, rst_n = 0;
  word_t in_word;
  logic [NR-1:0] rdl_flags;
  logic rdl_alert, alert;
  logic [2:0] rdl_idx;
  logic [NSETS-1:0] rom_match;
  logic [NSETS-1:0][1:0] rom_idx;

  int checks = 0, failures = 0;
  int n_rdl1 = 0, n_rdlm = 0, n_near = 0, n_odd = 0, n_even = 0, n_alert = 0;
  int n_set [NSETS];
  int n_align [4];
  byte unsigned s [NWORDS*4 + 16];
  logic [NR-1:0] e_flags [NWORDS];
  bit e_rm [NSETS][NWORDS];
  int e_ri [NSETS][NWORDS];

  deep_packet_filter dut (
    .clk(clk), .rst_n(rst_n), .in_word(in_word), .rdl_flags(rdl_flags),
    .rdl_alert(rdl_alert), .rdl_idx(rdl_idx), .rom_match(rom_match),
    .rom_idx(rom_idx), .alert(alert));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NWORDS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit at(input string p, input int st);
    if (st < 0) return 1'b0;
    for (int j = 0; j < p.len(); j++) if (s[st + j] != p[j]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int highest(input logic [NR-1:0] f);
    for (int k = NR - 1; k >= 0; k--) if (f[k]) return k;
    return -1;
  endfunction

  function automatic bit exp_alert(input int w);
    // rdl_alert of word w-LATA+.. and rom_match of the words that show at the same time
    bit a;
    int wr, wm;
    a = 0;
    wr = w - LATA;
    wm = w - LATR;
    if (wr >= 0 && wr < NWORDS && e_flags[wr] != 0) a = 1;
    for (int t = 0; t < NSETS; t++) if (wm >= 0 && wm < NWORDS && e_rm[t][wm]) a = 1;
    return a;
  endfunction

  initial begin
    int pos;
    pos = 0;
    for (int k = 0; k < NWORDS * 4 + 16; k++) s[k] = 0;
    while (pos < NWORDS * 4) begin
      int r, t, k;
      string p;
      r = $urandom % 100;
      if (r < 18 && pos + 16 <= NWORDS * 4) begin
        if (r < 6) p = rdl[$urandom % NR];
        else begin
          t = $urandom % NSETS;
          k = $urandom % romn[t];
          p = romp[t][k];
        end
        for (int j = 0; j < p.len(); j++) s[pos + j] = p[j];
        if (r >= 6 && r < 9) begin
          s[pos + 4 + $urandom % (p.len() - 4)] = "#";
          n_near++;
        end
        pos += p.len();
      end else begin
        s[pos] = ALPH[$urandom % ALPH.len()];
        pos++;
      end
    end
    for (int w = 0; w < NWORDS; w++) begin
      e_flags[w] = '0;
      for (int t = 0; t < NSETS; t++) begin e_rm[t][w] = 0; e_ri[t][w] = 0; end
      for (int l = 0; l < 4; l++) begin
        for (int k = 0; k < NR; k++)
          if (at(rdl[k], 4*w + l - rdl[k].len() + 1)) e_flags[w][k] = 1'b1;
        for (int t = 0; t < NSETS; t++)
          for (int k = 0; k < romn[t]; k++)
            if (at(romp[t][k], 4*w + l)) begin
              e_rm[t][w] = 1; e_ri[t][w] = k;
              n_set[t]++; n_align[l]++;
              if (t == 0) begin if (k % 2) n_odd++; else n_even++; end
            end
      end
      if ($countones(e_flags[w]) == 1) n_rdl1++;
      if ($countones(e_flags[w]) > 1) n_rdlm++;
    end
    in_word = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NWORDS + LATR + 1; n++) begin
      @(negedge clk);
      if (n >= LATF && n - LATF < NWORDS) begin
        checks++;
        if (rdl_flags !== e_flags[n - LATF]) begin
          failures++;
          if (failures < 10) $display("word %0d: rdl_flags %b expected %b", n - LATF, rdl_flags, e_flags[n - LATF]);
        end
      end
      if (n >= LATA && n - LATA < NWORDS) begin
        int h;
        h = highest(e_flags[n - LATA]);
        checks++;
        if (rdl_alert !== (h >= 0) || (h >= 0 && rdl_idx !== 3'(h))) begin
          failures++;
          if (failures < 10) $display("word %0d: rdl_alert %b idx %0d expected %0d", n - LATA, rdl_alert, rdl_idx, h);
        end
      end
      if (n >= LATR && n - LATR < NWORDS) begin
        for (int t = 0; t < NSETS; t++) begin
          checks++;
          if (rom_match[t] !== e_rm[t][n - LATR] || (rom_match[t] && rom_idx[t] !== 2'(e_ri[t][n - LATR]))) begin
            failures++;
            if (failures < 10) $display("word %0d set %0d: match %b idx %0d expected %b %0d", n - LATR, t,
                                        rom_match[t], rom_idx[t], e_rm[t][n - LATR], e_ri[t][n - LATR]);
          end
        end
      end
      if (n >= 1) begin
        checks++;
        if (alert) n_alert++;
        if (alert !== exp_alert(n - 1)) begin
          failures++;
          if (failures < 10) $display("cycle %0d: alert %b", n, alert);
        end
      end
      for (int l = 0; l < 4; l++) in_word[l] = (n < NWORDS) ? s[4*n + l] : 8'h00;
    end
    checks += 5 + NSETS + 4;
    if (n_rdl1 == 0) begin failures++; $display("no single RDL match"); end
    if (n_rdlm == 0) begin failures++; $display("no prioritised RDL match"); end
    if (n_near == 0) begin failures++; $display("no near miss"); end
    if (n_odd == 0 || n_even == 0) begin failures++; $display("folded ROM: odd or even entry never matched"); end
    if (n_alert == 0) begin failures++; $display("alert never raised"); end
    for (int t = 0; t < NSETS; t++) if (n_set[t] == 0) begin failures++; $display("set %0d never matched", t); end
    for (int a = 0; a < 4; a++) if (n_align[a] == 0) begin failures++; $display("no ROM match at alignment %0d", a); end
    $display("RDL: %0d single, %0d prioritised; ROM sets: %0d %0d %0d %0d %0d; alignments %0d %0d %0d %0d",
             n_rdl1, n_rdlm, n_set[0], n_set[1], n_set[2], n_set[3], n_set[4],
             n_align[0], n_align[1], n_align[2], n_align[3]);
    $display("folded set: %0d even / %0d odd entries; near misses %0d; alert cycles %0d",
             n_even, n_odd, n_near, n_alert);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
