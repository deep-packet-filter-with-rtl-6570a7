// tb_rdl_filter: the RDL filter with its default five patterns ("ABC",
// "ABCDE", "BABAB", "ABAB", "%c0%af") on a random stream over their
// letters with planted occurrences. A reference search gives, for every
// word, which patterns end in it. flags must follow three clock edges after
// the word is applied at in_word, alert/idx four edges after, with idx the
// highest-numbered pattern that matched. Words where several patterns match
// at once (so the priority decides) are counted and must occur.
module tb_rdl_filter;
  import dpf_pkg::*;
  localparam int N = 5;
  localparam int NWORDS = 4000;
  localparam int LATF = 3;   // flags
  localparam int LATA = 4;   // alert / idx
  localparam string ALPH = "ABCDE%c0af";

  string pats [N] = '{"ABC", "ABCDE", "BABAB", "ABAB", "%c0%af"};

  logic clk = 0, rst_n = 0;
  word_t in_word;
  logic [N-1:0] flags;
  logic alert;
  logic [2:0] idx;
  int checks = 0, failures = 0, multi = 0, singles = 0;
  byte unsigned s [NWORDS*4];
  logic [N-1:0] exp [NWORDS];

  rdl_filter dut (.clk(clk), .rst_n(rst_n), .in_word(in_word), .flags(flags),
                  .alert(alert), .idx(idx));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NWORDS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit occurs_end(input string p, input int e);
    int st;
    st = e - p.len() + 1;
    if (st < 0) return 1'b0;
    for (int j = 0; j < p.len(); j++) if (s[st + j] != p[j]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int highest(input logic [N-1:0] f);
    for (int k = N - 1; k >= 0; k--) if (f[k]) return k;
    return -1;
  endfunction

  initial begin
    int pos;
    pos = 0;
    while (pos < NWORDS * 4) begin
      int r;
      r = $urandom % 100;
      if (r < 15 && pos + 6 <= NWORDS * 4) begin
        string p;
        p = pats[$urandom % N];
        for (int j = 0; j < p.len(); j++) s[pos + j] = p[j];
        pos += p.len();
      end else begin
        s[pos] = ALPH[$urandom % ALPH.len()];
        pos++;
      end
    end
    for (int w = 0; w < NWORDS; w++) begin
      exp[w] = '0;
      for (int l = 0; l < 4; l++)
        for (int k = 0; k < N; k++)
          if (occurs_end(pats[k], 4*w + l)) exp[w][k] = 1'b1;
      if ($countones(exp[w]) > 1) multi++;
      if ($countones(exp[w]) == 1) singles++;
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
          if (failures < 10) $display("word %0d: flags %b expected %b", n - LATF, flags, exp[n - LATF]);
        end
      end
      if (n >= LATA) begin
        int h;
        h = highest(exp[n - LATA]);
        checks++;
        if (alert !== (h >= 0) || (h >= 0 && idx !== 3'(h))) begin
          failures++;
          if (failures < 10) $display("word %0d: alert %b idx %0d expected %0d", n - LATA, alert, idx, h);
        end
      end
      for (int l = 0; l < 4; l++) in_word[l] = (n < NWORDS) ? s[4*n + l] : 8'h00;
    end
    checks += 2;
    if (multi == 0) begin failures++; $display("no word with several matches"); end
    if (singles == 0) begin failures++; $display("no word with a single match"); end
    $display("words with one match %0d, with several matches %0d", singles, multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
