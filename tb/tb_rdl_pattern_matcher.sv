// tb_rdl_pattern_matcher: drives inspection modules for "ABCDE" (spans up
// to three words) and "ABC" (one or two words) with a random stream over
// the letters A..E, in which whole patterns are planted at random offsets.
// A reference search over the byte stream says in which word each
// occurrence ends; match must be high exactly two clock edges after that
// word, one word per clock. Occurrences at each of the four alignments are
// counted and must all happen.
module tb_rdl_pattern_matcher;
  import dpf_pkg::*;
  localparam int NWORDS = 3000;
  localparam int LAT    = 2;
  localparam string P0 = "ABCDE";
  localparam string P1 = "ABC";

  logic clk = 0, rst_n = 0;
  word_t data;
  lane_dec_t dec;
  logic m0, m1;
  int checks = 0, failures = 0;
  int seen_align [2][4];
  byte unsigned s [NWORDS*4];
  bit exp0 [NWORDS], exp1 [NWORDS];

  byte_decoder #(.LANES(BUS_BYTES)) u_dec (.data(data), .dec(dec));
  rdl_pattern_matcher #(.MAXLEN(16), .LEN(5), .PAT(128'("ABCDE"))) dut0
    (.clk(clk), .rst_n(rst_n), .dec(dec), .match(m0));
  rdl_pattern_matcher #(.MAXLEN(16), .LEN(3), .PAT(128'("ABC"))) dut1
    (.clk(clk), .rst_n(rst_n), .dec(dec), .match(m1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NWORDS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit occurs_end(input string p, input int e);
    int st = e - p.len() + 1;
    if (st < 0) return 1'b0;
    for (int j = 0; j < p.len(); j++) if (s[st + j] != p[j]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int pos = 0;
    while (pos < NWORDS * 4) begin
      int r;
      string p;
      r = $urandom % 100;
      p = (r < 6) ? P0 : (r < 10) ? P1 : "";
      if (p.len() > 0 && pos + p.len() <= NWORDS * 4) begin
        for (int j = 0; j < p.len(); j++) s[pos + j] = p[j];
        pos += p.len();
      end else begin
        s[pos] = 8'h41 + 8'($urandom % 5);
        pos++;
      end
    end
    for (int w = 0; w < NWORDS; w++) begin
      exp0[w] = 0; exp1[w] = 0;
      for (int l = 0; l < 4; l++) begin
        if (occurs_end(P0, 4*w + l)) begin
          exp0[w] = 1; seen_align[0][(4*w + l - 4) % 4]++;
        end
        if (occurs_end(P1, 4*w + l)) begin
          exp1[w] = 1; seen_align[1][(4*w + l - 2) % 4]++;
        end
      end
    end
    data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NWORDS + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        int w;
        w = n - LAT;
        checks += 2;
        if (m0 !== exp0[w]) begin
          failures++;
          if (failures < 10) $display("word %0d: ABCDE match %b expected %b", w, m0, exp0[w]);
        end
        if (m1 !== exp1[w]) begin
          failures++;
          if (failures < 10) $display("word %0d: ABC match %b expected %b", w, m1, exp1[w]);
        end
      end
      for (int l = 0; l < 4; l++) data[l] = (n < NWORDS) ? s[4*n + l] : 8'h00;
    end
    for (int k = 0; k < 2; k++)
      for (int a = 0; a < 4; a++) begin
        checks++;
        if (seen_align[k][a] == 0) begin
          failures++;
          $display("pattern %0d never seen at alignment %0d", k, a);
        end
      end
    $display("occurrences ABCDE per alignment %0d %0d %0d %0d, ABC %0d %0d %0d %0d",
             seen_align[0][0], seen_align[0][1], seen_align[0][2], seen_align[0][3],
             seen_align[1][0], seen_align[1][1], seen_align[1][2], seen_align[1][3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
