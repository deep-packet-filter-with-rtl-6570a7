// priority_encoder: pruned priority binary tree address encoder.
//
// N match flags are padded with zeros to 2^AW and summed by a binary OR tree.
// Flag N-1 has the highest priority. Address bit AW-l (l = 1 for the MSB) is
// the OR, over every upper-half node at tree level l, of that node's output
// ANDed with the inverted upper sibling of each ancestor reached through a
// lower half. With AW = 4 and flags D15..D0 this gives
//   bit3 = A1
//   bit2 = B1 + B3 & ~A1
//   bit1 = C1 + C3 & ~B1 + C5 & ~A1 + C7 & ~A1 & ~B3
//   bit0 = D15 + D13 & ~C1 + D11 & ~B1 + D9 & ~B1 & ~C3 + D7 & ~A1 + ...
// where A1 is the upper child of the root, B1/B3 the upper children of A1/A2,
// and so on. Lower-half nodes along the bottom edge of the tree feed no
// address term and are removed by synthesis. The root OR is still built
// because it is the filter's single "any pattern matched" flag.
//
// Interface: flags in, idx (highest set flag) and any out.
// Timing: both outputs are registered, one clock after flags.
//
// The OR tree and the bit equations follow the published architecture;
// keeping the root as 'any', zero padding and the reset are choices made
// here.
module priority_encoder
  import dpf_pkg::*;
#(
  parameter int unsigned N  = 1519,
  localparam int unsigned AW = addr_w(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  flags,
  output logic [AW-1:0] idx,
  output logic          any
);
  localparam int unsigned NP = 1 << AW;

  // node[l][k]: OR of flags k*2^(AW-l) .. (k+1)*2^(AW-l)-1. Level AW = flags.
  logic [NP-1:0] node [AW+1];
  logic [AW-1:0]       idx_d;

  always_comb begin
    for (int unsigned l = 0; l <= AW; l++) node[l] = '0;
    node[AW][N-1:0] = flags;
    for (int l = int'(AW) - 1; l >= 0; l--)
      for (int unsigned k = 0; k < (1 << l); k++)
        node[l][k] = node[l+1][2*k] | node[l+1][2*k+1];
  end

  always_comb begin
    for (int unsigned l = 1; l <= AW; l++) begin
      idx_d[AW-l] = 1'b0;
      for (int unsigned k = 1; k < (1 << l); k += 2) begin
        logic term;
        term = node[l][k];
        // ancestors at levels m < l reached through their lower half
        for (int unsigned m = 1; m < l; m++) begin
          int unsigned anc;
          anc = k >> (l - m);
          if (anc[0] == 1'b0)
            term = term & ~node[m][anc + 1];
        end
        idx_d[AW-l] = idx_d[AW-l] | term;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0;
      any <= 1'b0;
    end else begin
      idx <= idx_d;
      any <= node[0][0];
    end
  end
endmodule
