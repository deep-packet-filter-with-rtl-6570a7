// tb_rdl_full_set: the RDL filter at the size of a full rule set: 1519
// patterns with 19,021 pattern bytes in total, 3 to 23 characters long.
// The contents are synthetic: character j of pattern i comes from a linear
// congruential sequence over the 16 letters 'a'..'p', and the length of
// pattern i is 3 + (7i mod 20), plus one for i < 37. A random stream over
// the same letters carries planted patterns. The reference search gives,
// for every word, the patterns that end in it; flags are checked three
// clock edges after the word, alert/idx (highest pattern number) four.
module tb_rdl_full_set;
  import dpf_pkg::*;
  localparam int N = 1519;
  localparam int MAXLEN = 24;
  localparam int NWORDS = 1500;
  localparam int LATF = 3, LATA = 4;

  function automatic logic [N-1:0][7:0] gen_len();
    logic [N-1:0][7:0] l;
    for (int i = 0; i < N; i++) l[i] = 8'(3 + (i * 7) % 20 + (i < 37 ? 1 : 0));
    return l;
  endfunction

  function automatic logic [N-1:0][MAXLEN-1:0][7:0] gen_pat();
    logic [N-1:0][MAXLEN-1:0][7:0] p;
    logic [31:0] x;
    logic [N-1:0][7:0] l;
    l = gen_len();
    x = 32'd2064;
    p = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < int'(l[i]); j++) begin
        x = x * 32'd1664525 + 32'd1013904223;
        p[i][int'(l[i]) - 1 - j] = 8'h61 + 8'(x[27:24]);
      end
    return p;
  endfunction

  localparam logic [N-1:0][7:0]             LEN = gen_len();
  localparam logic [N-1:0][MAXLEN-1:0][7:0] PAT = gen_pat();

  logic clk = 0, rst_n = 0;
  word_t in_word;
  logic [N-1:0] flags;
  logic alert;
  logic [10:0] idx;
  int checks = 0, failures = 0, n_hit = 0, n_multi = 0, total = 0;
  byte unsigned s [NWORDS*4];
  logic [N-1:0] exp [NWORDS];

  rdl_filter #(.N(N), .MAXLEN(MAXLEN), .PAT(PAT), .LEN(LEN)) dut (
    .clk(clk), .rst_n(rst_n), .in_word(in_word), .flags(flags), .alert(alert), .idx(idx));

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

  function automatic bit ends_at(input int i, input int e);
    int st;
    st = e - int'(LEN[i]) + 1;
    if (st < 0) return 1'b0;
    for (int j = 0; j < int'(LEN[i]); j++) if (s[st + j] != ch(i, j)) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int pos;
    for (int i = 0; i < N; i++) total += int'(LEN[i]);
    pos = 0;
    while (pos < NWORDS * 4) begin
      if ($urandom % 100 < 12 && pos + MAXLEN <= NWORDS * 4) begin
        int i;
        i = $urandom % N;
        for (int j = 0; j < int'(LEN[i]); j++) s[pos + j] = ch(i, j);
        pos += int'(LEN[i]);
      end else begin
        s[pos] = 8'h61 + 8'($urandom % 16);
        pos++;
      end
    end
    for (int w = 0; w < NWORDS; w++) begin
      exp[w] = '0;
      for (int l = 0; l < 4; l++)
        for (int i = 0; i < N; i++)
          if (s[4*w + l] == ch(i, int'(LEN[i]) - 1) && ends_at(i, 4*w + l)) exp[w][i] = 1'b1;
      if (exp[w] != '0) n_hit++;
      if ($countones(exp[w]) > 1) n_multi++;
    end
    in_word = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NWORDS + LATA; n++) begin
      @(negedge clk);
      if (n >= LATF && n - LATF < NWORDS) begin
        checks++;
        if (flags !== exp[n - LATF]) begin
          failures++;
          if (failures < 10) $display("word %0d: flags differ", n - LATF);
        end
      end
      if (n >= LATA) begin
        int h;
        h = -1;
        for (int i = N - 1; i >= 0 && h < 0; i--) if (exp[n - LATA][i]) h = i;
        checks++;
        if (alert !== (h >= 0) || (h >= 0 && idx !== 11'(h))) begin
          failures++;
          if (failures < 10) $display("word %0d: alert %b idx %0d expected %0d", n - LATA, alert, idx, h);
        end
      end
      for (int l = 0; l < 4; l++) in_word[l] = (n < NWORDS) ? s[4*n + l] : 8'h00;
    end
    checks += 3;
    if (total != 19021) begin failures++; $display("pattern bytes %0d", total); end
    if (n_hit == 0) failures++;
    if (n_multi == 0) failures++;
    $display("%0d patterns, %0d bytes; words with a match %0d, with several %0d", N, total, n_hit, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
