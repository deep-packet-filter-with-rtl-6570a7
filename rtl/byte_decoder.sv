// byte_decoder: the shared 8-bit comparators of the RDL filter.
//
// Every byte lane of the bus gets one full 8-to-256 decoder. Output bit v of
// lane l is high when that lane carries the byte value v. Every pattern
// comparator that checks "lane l holds character c" takes bit c of lane l
// instead of building its own 8-bit comparator, so each (lane, value) pair is
// decoded once for the whole filter.
//
// Interface: word in, LANES x 256 one-hot vectors out.
// Timing: purely combinational; the caller registers the bus in front of it.
//
// The shared 8-bit decoder per lane follows the published architecture;
// keeping it combinational, with the register in the filter, is a choice
// made here.
module byte_decoder #(
  parameter int unsigned LANES = dpf_pkg::BUS_BYTES
) (
  input  logic [LANES-1:0][7:0]   data,
  output logic [LANES-1:0][255:0] dec
);
  always_comb begin
    for (int unsigned l = 0; l < LANES; l++)
      for (int unsigned v = 0; v < 256; v++)
        dec[l][v] = (data[l] == 8'(v));
  end
endmodule
