// tb_suffix_comparator: 12-byte suffixes, four-word window. Random words
// stream in, one per clock. In random cycles a lookup is presented with a
// random alignment and length and a suffix copied from the window as the
// reference sees it (window byte align+k, oldest word first); in some of
// them one byte inside the length is corrupted (must not match), in others
// one byte beyond the length (must still match). match and match_idx are
// checked one clock edge later.
module tb_suffix_comparator;
  import dpf_pkg::*;
  localparam int MAXS = 12, LB = 4, NW = 4, IW = 9;
  localparam int NCYC = 5000;

  logic clk = 0, rst_n = 0;
  word_t in_word;
  logic en;
  logic [1:0] align;
  logic [IW-1:0] idx;
  logic [MAXS-1:0][7:0] suf;
  logic [LB-1:0] suf_len;
  logic match;
  logic [IW-1:0] match_idx;
  int checks = 0, failures = 0, n_match = 0, n_miss = 0, n_tail = 0;
  word_t hist [NCYC];

  suffix_comparator #(.MAXS(MAXS), .LB(LB), .NW(NW), .IW(IW)) dut (
    .clk(clk), .rst_n(rst_n), .in_word(in_word), .en(en), .align(align), .idx(idx),
    .suf(suf), .suf_len(suf_len), .match(match), .match_idx(match_idx));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_m, exp_v;
    logic [IW-1:0] exp_i;
    en = 0; align = 0; idx = 0; suf = '0; suf_len = 0; in_word = '0;
    exp_v = 0; exp_m = 0; exp_i = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NCYC; n++) begin
      // check the lookup of the previous cycle
      if (exp_v) begin
        checks++;
        if (match !== exp_m || (exp_m && match_idx !== exp_i)) begin
          failures++;
          if (failures < 10) $display("cycle %0d: match %b expected %b", n, match, exp_m);
        end
      end else if (n > 0) begin
        checks++;
        if (match !== 1'b0) failures++;
      end
      hist[n] = word_t'({$urandom % 4 == 0 ? 8'h41 : 8'($urandom), 24'($urandom)});
      in_word = hist[n];
      exp_v = 0;
      en = 0;
      if (n >= NW - 1 && ($urandom % 3) != 0) begin
        int a, len, mode, pick;
        a = $urandom % 4;
        len = $urandom % (MAXS + 1);
        mode = $urandom % 3;
        for (int k = 0; k < MAXS; k++) begin
          int b;
          b = a + k;
          suf[k] = hist[n - (NW - 1) + b / 4][b % 4];
        end
        exp_m = 1;
        if (mode == 1 && len > 0) begin
          pick = $urandom % len;
          suf[pick] = suf[pick] ^ 8'(1 << ($urandom % 8));
          exp_m = 0;
          n_miss++;
        end else if (mode == 2 && len < MAXS) begin
          pick = len + $urandom % (MAXS - len);
          suf[pick] = suf[pick] ^ 8'h5a;
          n_tail++;
        end
        if (exp_m) n_match++;
        en = 1; align = 2'(a); suf_len = LB'(len); idx = IW'($urandom);
        exp_i = idx; exp_v = 1;
      end
      @(negedge clk);
    end
    checks += 3;
    if (n_match == 0) failures++;
    if (n_miss == 0) failures++;
    if (n_tail == 0) failures++;
    $display("lookups: %0d match, %0d corrupted inside length, %0d corrupted beyond length",
             n_match, n_miss, n_tail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
