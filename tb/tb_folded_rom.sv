// tb_folded_rom: a folded ROM of 16 logical entries, 40 bits wide. Entry i
// uses its low 34-2i bits (random contents with the top used bit set), so
// the entries are sorted by length and each even/odd pair fits in one
// physical row. Every address, even and odd, is read in random order. One
// clock edge later the low (used) bits of the output must equal the logical
// entry, and the rest must be the bit-reversed partner entry DEPTH-1-addr
// that shares the physical row.
module tb_folded_rom;
  localparam int DEPTH = 16;
  localparam int DW    = 40;

  function automatic logic [DEPTH-1:0][DW-1:0] gen();
    logic [DEPTH-1:0][DW-1:0] c;
    logic [63:0] x;
    x = 64'h0bad_cafe_1234_5678;
    for (int i = 0; i < DEPTH; i++) begin
      int u;
      u = 34 - 2 * i;
      x = x * 64'd6364136223846793005 + 64'd1442695040888963407;
      c[i] = '0;
      for (int b = 0; b < u; b++) c[i][b] = x[b + 8];
      c[i][u - 1] = 1'b1;
    end
    return c;
  endfunction
  localparam logic [DEPTH-1:0][DW-1:0] C = gen();

  function automatic logic [DW-1:0] rev(input logic [DW-1:0] v);
    for (int b = 0; b < DW; b++) rev[b] = v[DW-1-b];
  endfunction

  function automatic logic [DW-1:0] used(input int i);
    used = '0;
    for (int b = 0; b < 34 - 2 * i; b++) used[b] = 1'b1;
  endfunction

  logic clk = 0;
  logic [3:0] addr;
  logic [DW-1:0] data;
  int checks = 0, failures = 0, odd = 0, even = 0;

  folded_rom #(.DEPTH(DEPTH), .DW(DW), .CONTENT(C)) dut (.clk(clk), .addr(addr), .data(data));

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
      addr = (t < DEPTH) ? 4'(t) : 4'($urandom);
      @(negedge clk);
      checks++;
      if (addr[0]) odd++; else even++;
      if ((data & used(addr)) !== C[addr] || data !== (C[addr] | rev(C[DEPTH-1-addr]))) begin
        failures++;
        if (failures < 10) $display("addr %0d: %h expected %h", addr, data, C[addr]);
      end
    end
    checks++;
    if (odd == 0 || even == 0) failures++;
    $display("even reads %0d, odd reads %0d", even, odd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
