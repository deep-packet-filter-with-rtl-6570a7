// suffix_rom: read-only memory that holds the suffix entries of one ROM
// based filter.
//
// Each entry carries the length of a suffix in its low bits and the suffix
// characters above it (see rom_filter for the layout). The contents come in
// as a parameter and are fixed when the design is built, which is how an FPGA
// block memory used as ROM is initialised. The read is synchronous, as a
// block memory reads, so synthesis can map the array onto one.
//
// Interface: addr in, data out.
// Timing: data holds CONTENT[addr] one clock edge after addr is sampled.
//
// A ROM holding suffix and length follows the published architecture; the
// generic array in place of vendor memory templates and the one-cycle read
// are choices made here.
module suffix_rom #(
  parameter int unsigned                 DEPTH   = 256,
  parameter int unsigned                 DW      = 72,
  parameter logic [DEPTH-1:0][DW-1:0]    CONTENT = '0,
  localparam int unsigned                AW      = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);
  logic [DW-1:0] rom [DEPTH];

  always_comb begin
    for (int unsigned i = 0; i < DEPTH; i++) rom[i] = CONTENT[i];
  end

  always_ff @(posedge clk) begin
    data <= rom[addr];
  end
endmodule
