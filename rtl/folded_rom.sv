// folded_rom: ROM of DEPTH logical entries stored in DEPTH/2 physical rows.
//
// When the entries are sorted by length, long entries come first and short
// ones last, so half of a plain ROM is empty. This wrapper stores even entry
// 2r in row r as it is, and odd entry 2j+1 bit-reversed in row DEPTH/2-1-j,
// so that each row holds one long even entry in its low bits and one short
// odd entry in its high bits. Reading needs little logic: address bit 0
// picks even or odd; for an even entry the remaining address bits go to the
// memory as they are, for an odd entry they are inverted first. Address bit 0
// is registered alongside the synchronous memory read and selects, through a
// 2-to-1 multiplexer, either the row or the row with its bit order reversed.
// The physical row contents are computed from the logical contents when the
// design is built; elaboration stops if a row's two entries overlap.
//
// Interface: same as suffix_rom with DEPTH logical entries; DEPTH must be a
// power of two. Timing: one clock edge from addr to data, like suffix_rom.
//
// The storage order, address inversion, registered LSB and output
// multiplexer follow the published architecture. The output keeps the row
// partner's reversed bits above the entry's used length; the comparator
// ignores them. Computing the rows at elaboration is a choice made here.
module folded_rom #(
  parameter int unsigned                 DEPTH   = 512,
  parameter int unsigned                 DW      = 72,
  parameter logic [DEPTH-1:0][DW-1:0]    CONTENT = '0,
  localparam int unsigned                AW      = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);
  localparam int unsigned ROWS = DEPTH / 2;
  localparam int unsigned PAW  = (ROWS <= 2) ? 1 : $clog2(ROWS);

  function automatic logic [DW-1:0] rev(input logic [DW-1:0] v);
    logic [DW-1:0] r;
    for (int unsigned b = 0; b < DW; b++) r[b] = v[DW-1-b];
    return r;
  endfunction

  function automatic logic [ROWS-1:0][DW-1:0] fold();
    logic [ROWS-1:0][DW-1:0] p;
    for (int unsigned r = 0; r < ROWS; r++)
      p[r] = CONTENT[2*r] | rev(CONTENT[DEPTH-1-2*r]);
    return p;
  endfunction

  function automatic bit fits();
    for (int unsigned r = 0; r < ROWS; r++)
      if ((CONTENT[2*r] & rev(CONTENT[DEPTH-1-2*r])) != '0) return 1'b0;
    return 1'b1;
  endfunction

  localparam logic [ROWS-1:0][DW-1:0] PHYS = fold();

  logic [PAW-1:0] phys_addr;
  logic           odd_q;
  logic [DW-1:0]  row;

  // Rows = 1 would leave no physical address bits to invert.
  if (DEPTH < 4 || (1 << AW) != DEPTH) begin : g_bad_depth
    $error("folded_rom: DEPTH must be a power of two, at least 4");
  end
  if (!fits()) begin : g_overlap
    $error("folded_rom: an even and an odd entry overlap in one row");
  end

  assign phys_addr = addr[0] ? ~addr[AW-1:1] : addr[AW-1:1];

  suffix_rom #(.DEPTH(ROWS), .DW(DW), .CONTENT(PHYS)) u_mem (
    .clk  (clk),
    .addr (phys_addr),
    .data (row)
  );

  always_ff @(posedge clk) begin
    odd_q <= addr[0];
  end

  assign data = odd_q ? rev(row) : row;
endmodule
