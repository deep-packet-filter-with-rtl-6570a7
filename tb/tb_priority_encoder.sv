// tb_priority_encoder: checks the pruned priority tree encoder against a
// direct "highest set flag" search. Two sizes are tested: 16 flags (the
// four-level tree with its closed-form bit equations) and 13 flags (padded
// to 16). Outputs are registered, so each result is compared one clock
// after its flags were applied, with a new flag vector every clock.
module tb_priority_encoder;
  localparam int N1 = 16;
  localparam int N2 = 13;
  logic clk = 0, rst_n = 0;
  logic [N1-1:0] f1;
  logic [N2-1:0] f2;
  logic [3:0]    i1, i2;
  logic          a1, a2;
  int checks = 0, failures = 0;

  priority_encoder #(.N(N1)) dut1 (.clk(clk), .rst_n(rst_n), .flags(f1), .idx(i1), .any(a1));
  priority_encoder #(.N(N2)) dut2 (.clk(clk), .rst_n(rst_n), .flags(f2), .idx(i2), .any(a2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int highest(input logic [31:0] f, input int n);
    for (int k = n - 1; k >= 0; k--) if (f[k]) return k;
    return -1;
  endfunction

  // Closed-form equations for a 16-flag tree (D15 highest).
  function automatic logic [3:0] eqns(input logic [15:0] d);
    logic a1_, b1, b3, c1, c3, c5, c7;
    a1_ = |d[15:8]; b1 = |d[15:12]; b3 = |d[7:4];
    c1 = |d[15:14]; c3 = |d[11:10]; c5 = |d[7:6]; c7 = |d[3:2];
    eqns[3] = a1_;
    eqns[2] = b1 | (b3 & ~a1_);
    eqns[1] = c1 | (c3 & ~b1) | (c5 & ~a1_) | (c7 & ~a1_ & ~b3);
    eqns[0] = d[15] | (d[13] & ~c1) | (d[11] & ~b1) | (d[9] & ~b1 & ~c3) | (d[7] & ~a1_)
            | (d[5] & ~a1_ & ~c5) | (d[3] & ~a1_ & ~b3) | (d[1] & ~a1_ & ~b3 & ~c7);
  endfunction

  initial begin
    logic [N1-1:0] p1;
    logic [N2-1:0] p2;
    f1 = '0; f2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    p1 = '0; p2 = '0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // outputs now reflect the flags applied one clock ago
      if (t > 0) begin
        int h1, h2;
        h1 = highest(32'(p1), N1);
        h2 = highest(32'(p2), N2);
        checks += 4;
        if (a1 !== (h1 >= 0)) failures++;
        if (a2 !== (h2 >= 0)) failures++;
        if (h1 >= 0 && (i1 !== 4'(h1) || i1 !== eqns(p1))) begin
          failures++;
          if (failures < 10) $display("N=16 flags %h: idx %0d expected %0d", p1, i1, h1);
        end
        if (h2 >= 0 && i2 !== 4'(h2)) begin
          failures++;
          if (failures < 10) $display("N=13 flags %h: idx %0d expected %0d", p2, i2, h2);
        end
      end
      // sparse vectors most of the time, so that every position gets to win
      case (t % 3)
        0: f1 = N1'($urandom);
        1: f1 = N1'(1) << ($urandom % N1);
        default: f1 = N1'($urandom) & N1'($urandom) & N1'($urandom) & N1'($urandom);
      endcase
      if (t % 17 == 0) f1 = '0;
      case (t % 4)
        0: f2 = N2'($urandom);
        1: f2 = N2'(1) << ($urandom % N2);
        2: f2 = '0;
        default: f2 = N2'($urandom) & N2'($urandom) & N2'($urandom);
      endcase
      p1 = f1; p2 = f2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
