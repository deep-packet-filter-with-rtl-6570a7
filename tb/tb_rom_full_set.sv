// tb_rom_full_set: a ROM based filter at the size of the largest pattern
// set: 495 patterns with 6,805 pattern bytes, on the folded ROM (512
// logical entries in 256 rows). Contents are synthetic and chosen to obey
// the set rules by construction: prefix character 0 is an upper-case letter
// and characters 1..3 are lower-case letters or digits, so no prefix can
// overlap itself or another; characters 0 and 1 are unique per pattern.
// Suffix lengths fall with the entry number, and each even entry and its
// odd row partner together hold at most 19 bytes, so every row fits:
//   row r = entry 2r (19 - o_r bytes) + entry 511-2r (o_r bytes),
//   o_r = max(1, 19r/256), with entries 0..43 even one byte shorter.
// The reference search reports which pattern starts in each word; match and
// idx must follow eight clock edges later, one word per clock.
module tb_rom_full_set;
  import dpf_pkg::*;
  localparam int N = 495;
  localparam int MAXLEN = 24;
  localparam int NWORDS = 2000;
  localparam int LAT = 8;   // NW = ceil((20+3)/4) = 6 words; NW + 2 edges after the word is applied
  localparam string Y = "abcdefghijklmnopqrstuvwxyz0123456789";

  function automatic int suf_len(input int i);
    int r, o;
    r = (i % 2 == 0) ? i / 2 : (511 - i) / 2;
    o = (r * 19) / 256;
    if (o < 1) o = 1;
    if (i % 2 == 0) return 19 - o - ((i < 44) ? 1 : 0);
    return o;
  endfunction

  function automatic logic [N-1:0][7:0] gen_len();
    logic [N-1:0][7:0] l;
    for (int i = 0; i < N; i++) l[i] = 8'(4 + suf_len(i));
    return l;
  endfunction

  function automatic logic [N-1:0][MAXLEN-1:0][7:0] gen_pat();
    logic [N-1:0][MAXLEN-1:0][7:0] p;
    logic [31:0] x;
    int len;
    x = 32'd495;
    p = '0;
    for (int i = 0; i < N; i++) begin
      len = 4 + suf_len(i);
      for (int j = 0; j < len; j++) begin
        byte unsigned c;
        x = x * 32'd1664525 + 32'd1013904223;
        if (j == 0)      c = 8'h41 + 8'(i % 26);
        else if (j == 1) c = Y[(i / 26) % 36];
        else             c = Y[int'(x[31:16]) % 36];
        p[i][len - 1 - j] = c;
      end
    end
    return p;
  endfunction

  localparam logic [N-1:0][7:0]             LEN = gen_len();
  localparam logic [N-1:0][MAXLEN-1:0][7:0] PAT = gen_pat();

  logic clk = 0, rst_n = 0;
  word_t in_word;
  logic match;
  logic [8:0] idx;
  int checks = 0, failures = 0, total = 0, n_match = 0, n_odd = 0, n_near = 0;
  byte unsigned s [NWORDS*4 + 32];
  bit e_m [NWORDS];
  int e_i [NWORDS];

  rom_filter #(.N(N), .MAXLEN(MAXLEN), .PAT(PAT), .LEN(LEN), .FOLD(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .in_word(in_word), .match(match), .idx(idx));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NWORDS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic byte unsigned ch(input int i, input int j);
    return PAT[i][int'(LEN[i]) - 1 - j];
  endfunction

  function automatic bit starts(input int i, input int st);
    for (int j = 0; j < int'(LEN[i]); j++) if (s[st + j] != ch(i, j)) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int pos;
    for (int i = 0; i < N; i++) total += int'(LEN[i]);
    for (int k = 0; k < NWORDS * 4 + 32; k++) s[k] = 0;
    pos = 0;
    while (pos < NWORDS * 4) begin
      int r;
      r = $urandom % 100;
      if (r < 12 && pos + MAXLEN <= NWORDS * 4) begin
        int i;
        i = $urandom % N;
        for (int j = 0; j < int'(LEN[i]); j++) s[pos + j] = ch(i, j);
        if (r < 3) begin
          s[pos + 4 + $urandom % (int'(LEN[i]) - 4)] = "#";
          n_near++;
        end
        pos += int'(LEN[i]);
      end else begin
        s[pos] = ($urandom % 8 == 0) ? 8'h41 + 8'($urandom % 26) : Y[$urandom % 36];
        pos++;
      end
    end
    for (int w = 0; w < NWORDS; w++) begin
      e_m[w] = 0; e_i[w] = 0;
      for (int l = 0; l < 4; l++)
        for (int i = 0; i < N; i++)
          if (s[4*w + l] == ch(i, 0) && starts(i, 4*w + l)) begin
            e_m[w] = 1; e_i[w] = i; n_match++;
            if (i % 2) n_odd++;
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
        checks++;
        if (match !== e_m[w] || (e_m[w] && idx !== 9'(e_i[w]))) begin
          failures++;
          if (failures < 10) $display("word %0d: match %b idx %0d expected %b %0d", w, match, idx, e_m[w], e_i[w]);
        end
      end
      for (int l = 0; l < 4; l++) in_word[l] = (n < NWORDS) ? s[4*n + l] : 8'h00;
    end
    checks += 4;
    if (total != 6805) begin failures++; $display("pattern bytes %0d", total); end
    if (n_match == 0) failures++;
    if (n_odd == 0 || n_odd == n_match) failures++;
    if (n_near == 0) failures++;
    $display("%0d patterns, %0d bytes; matches %0d (odd entries %0d), near misses %0d",
             N, total, n_match, n_odd, n_near);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
