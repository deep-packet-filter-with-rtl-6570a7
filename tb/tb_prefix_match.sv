// tb_prefix_match: the prefix matcher with its default prefixes "/etc",
// "xp_c", "/bin" and "root" (numbers 0..3). A random stream over their
// letters, with prefixes planted at random offsets, is applied one word per
// clock straight to the decoded input. For every word t the reference says
// which prefix (if any) starts in it and at which lane; hit, align and
// index must show that two clock edges after word t was applied. Hits at
// every alignment are counted and must all occur.
module tb_prefix_match;
  import dpf_pkg::*;
  localparam int NP = 4;
  localparam int NWORDS = 4000;
  localparam int LAT = 2;
  localparam string ALPH = "/etcxp_binro";

  string pre [NP] = '{"/etc", "xp_c", "/bin", "root"};

  logic clk = 0, rst_n = 0;
  word_t data;
  lane_dec_t dec;
  logic hit;
  logic [1:0] align, index;
  int checks = 0, failures = 0;
  int per_align [4];
  byte unsigned s [NWORDS*4 + 8];
  bit   e_hit [NWORDS];
  int   e_align [NWORDS], e_idx [NWORDS];

  byte_decoder #(.LANES(BUS_BYTES)) u_dec (.data(data), .dec(dec));
  prefix_match dut (.clk(clk), .rst_n(rst_n), .dec(dec), .hit(hit), .align(align), .index(index));

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
    for (int k = 0; k < NWORDS * 4 + 8; k++) s[k] = 0;
    while (pos < NWORDS * 4) begin
      int r;
      r = $urandom % 100;
      if (r < 15 && pos + 4 <= NWORDS * 4) begin
        string p;
        p = pre[$urandom % NP];
        for (int j = 0; j < 4; j++) s[pos + j] = p[j];
        pos += 4;
      end else begin
        s[pos] = ALPH[$urandom % ALPH.len()];
        pos++;
      end
    end
    for (int w = 0; w < NWORDS; w++) begin
      e_hit[w] = 0; e_align[w] = 0; e_idx[w] = 0;
      for (int l = 0; l < 4; l++)
        for (int k = 0; k < NP; k++)
          if (starts(pre[k], 4*w + l)) begin
            if (e_hit[w]) begin failures++; $display("reference: two prefixes in word %0d", w); end
            e_hit[w] = 1; e_align[w] = l; e_idx[w] = k;
            per_align[l]++;
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
        checks++;
        if (hit !== e_hit[w] || (hit && (align !== 2'(e_align[w]) || index !== 2'(e_idx[w])))) begin
          failures++;
          if (failures < 10)
            $display("word %0d: hit %b align %0d index %0d, expected %b %0d %0d",
                     w, hit, align, index, e_hit[w], e_align[w], e_idx[w]);
        end
      end
      for (int l = 0; l < 4; l++) data[l] = (n < NWORDS) ? s[4*n + l] : 8'h00;
    end
    for (int a = 0; a < 4; a++) begin
      checks++;
      if (per_align[a] == 0) begin failures++; $display("no hit at alignment %0d", a); end
    end
    $display("prefix hits per alignment %0d %0d %0d %0d", per_align[0], per_align[1],
             per_align[2], per_align[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
