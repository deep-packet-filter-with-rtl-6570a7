// tb_rom_filter: the ROM based filter with its default set "/etc/passwd",
// "xp_cmdshell", "/bin/sh", "root.exe" (numbers 0..3), built twice: with
// the folded ROM (default) and with a plain ROM. A random stream over the
// patterns' letters carries planted patterns and planted near misses (a
// correct prefix followed by a suffix with one wrong or missing character).
// The reference search says, for every word, which pattern starts in it.
// Both filters must report it, with its number, NW+2 = 6 clock edges after
// that word is applied, one word per clock. Matches at every alignment, on
// even and odd ROM entries, and near misses are counted and must all occur.
module tb_rom_filter;
  import dpf_pkg::*;
  localparam int N = 4;
  localparam int NWORDS = 4000;
  localparam int LAT = 6;
  localparam string ALPH = "/etcpaswdxp_mhlbinro.";

  string pats [N] = '{"/etc/passwd", "xp_cmdshell", "/bin/sh", "root.exe"};

  logic clk = 0, rst_n = 0;
  word_t in_word;
  logic m_f, m_p;
  logic [1:0] i_f, i_p;
  int checks = 0, failures = 0, near = 0, odd = 0, even = 0;
  int per_align [4];
  byte unsigned s [NWORDS*4 + 16];
  bit e_m [NWORDS];
  int e_i [NWORDS];

  rom_filter dut_fold (.clk(clk), .rst_n(rst_n), .in_word(in_word), .match(m_f), .idx(i_f));
  rom_filter #(.FOLD(1'b0)) dut_plain (.clk(clk), .rst_n(rst_n), .in_word(in_word),
                                       .match(m_p), .idx(i_p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NWORDS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit starts(input string p, input int st);
    for (int j = 0; j < p.len(); j++) if (s[st + j] != p[j]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int pos;
    pos = 0;
    for (int k = 0; k < NWORDS * 4 + 16; k++) s[k] = 0;
    while (pos < NWORDS * 4) begin
      int r;
      r = $urandom % 100;
      if (r < 16 && pos + 12 <= NWORDS * 4) begin
        string p;
        int cut;
        p = pats[$urandom % N];
        for (int j = 0; j < p.len(); j++) s[pos + j] = p[j];
        if (r < 5) begin
          // near miss: corrupt one suffix character
          cut = 4 + $urandom % (p.len() - 4);
          s[pos + cut] = "#";
          near++;
        end
        pos += p.len();
      end else begin
        s[pos] = ALPH[$urandom % ALPH.len()];
        pos++;
      end
    end
    for (int w = 0; w < NWORDS; w++) begin
      e_m[w] = 0; e_i[w] = 0;
      for (int l = 0; l < 4; l++)
        for (int k = 0; k < N; k++)
          if (starts(pats[k], 4*w + l)) begin
            e_m[w] = 1; e_i[w] = k; per_align[l]++;
            if (k % 2) odd++; else even++;
          end
    end
    in_word = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NWORDS + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        int w;
        w = n - LAT;
        checks += 2;
        if (m_f !== e_m[w] || (e_m[w] && i_f !== 2'(e_i[w]))) begin
          failures++;
          if (failures < 10) $display("folded, word %0d: match %b idx %0d expected %b %0d",
                                      w, m_f, i_f, e_m[w], e_i[w]);
        end
        if (m_p !== e_m[w] || (e_m[w] && i_p !== 2'(e_i[w]))) begin
          failures++;
          if (failures < 10) $display("plain, word %0d: match %b idx %0d expected %b %0d",
                                      w, m_p, i_p, e_m[w], e_i[w]);
        end
      end
      for (int l = 0; l < 4; l++) in_word[l] = (n < NWORDS) ? s[4*n + l] : 8'h00;
    end
    for (int a = 0; a < 4; a++) begin
      checks++;
      if (per_align[a] == 0) begin failures++; $display("no match at alignment %0d", a); end
    end
    checks += 3;
    if (near == 0) failures++;
    if (odd == 0) failures++;
    if (even == 0) failures++;
    $display("matches per alignment %0d %0d %0d %0d; even entries %0d, odd entries %0d; near misses %0d",
             per_align[0], per_align[1], per_align[2], per_align[3], even, odd, near);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
