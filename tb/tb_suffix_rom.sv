// tb_suffix_rom: fills a 32 x 40 ROM with pseudo-random contents computed
// at elaboration (a 32-bit linear congruential sequence), reads every
// address in random order and checks that data equals the table entry one
// clock edge after the address was applied.
module tb_suffix_rom;
  localparam int DEPTH = 32;
  localparam int DW    = 40;

  function automatic logic [DEPTH-1:0][DW-1:0] gen();
    logic [DEPTH-1:0][DW-1:0] c;
    logic [31:0] x;
    x = 32'h1234_5678;
    for (int i = 0; i < DEPTH; i++) begin
      x = x * 32'd1664525 + 32'd1013904223;
      c[i][31:0] = x;
      x = x * 32'd1664525 + 32'd1013904223;
      c[i][DW-1:32] = x[DW-33:0];
    end
    return c;
  endfunction
  localparam logic [DEPTH-1:0][DW-1:0] C = gen();

  logic clk = 0;
  logic [4:0] addr, addr_q;
  logic [DW-1:0] data;
  int checks = 0, failures = 0;

  suffix_rom #(.DEPTH(DEPTH), .DW(DW), .CONTENT(C)) dut (.clk(clk), .addr(addr), .data(data));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0;
    @(negedge clk);
    for (int t = 0; t < 1000; t++) begin
      addr_q = addr;
      addr = (t < DEPTH) ? 5'(t) : 5'($urandom);
      @(negedge clk);
      checks++;
      if (data !== C[addr]) begin
        failures++;
        if (failures < 10) $display("addr %0d: %h expected %h", addr, data, C[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
