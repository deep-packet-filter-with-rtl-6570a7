// dpf_pkg: types, constants and elaboration-time helpers shared by the
// deep packet filter.
//
// The filter inspects a byte stream that arrives as one 32-bit word per
// clock. Byte lane 0 of a word is the byte that comes first in the stream.
// Patterns are handed to the filters as parameters written like SystemVerilog
// string literals: a pattern of length L sits right-aligned in its slot, so
// character j (0 = first) of the pattern is slot byte L-1-j.
//
// The ROM pattern-set rules (prefix_set_ok) encode the partitioning rules for
// ROM based filters: every prefix is exactly one bus word long, no prefix can
// be seen at two alignments at once, and no two prefixes of one set can be
// seen at the same time. They are checked while the design elaborates.
//
// The prefix rules follow the published architecture; checking them at
// elaboration instead of in an external pre-processor is a choice made here.
package dpf_pkg;

  // Width of the input bus in bytes (32-bit datapath).
  localparam int unsigned BUS_BYTES = 4;

  typedef logic [7:0]                 byte_t;
  typedef logic [BUS_BYTES-1:0][7:0]  word_t;     // [0] = first byte in stream
  typedef logic [255:0]               onehot_t;   // output of one 8-to-256 decoder
  typedef logic [BUS_BYTES-1:0][255:0] lane_dec_t;
  typedef logic [BUS_BYTES-1:0][7:0]  prefix_t;   // [0] = first prefix character

  // ceil(a / b) for positive integers
  function automatic int unsigned cdiv(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

  // Address width for n entries, at least one bit.
  function automatic int unsigned addr_w(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // A 4-character string literal as a prefix_t (first character in [0]).
  function automatic prefix_t str4(input logic [31:0] s);
    prefix_t p;
    for (int unsigned k = 0; k < BUS_BYTES; k++) p[k] = s[8*(BUS_BYTES-1-k) +: 8];
    return p;
  endfunction

  // True when the tail of p of length (4-s) equals the head of q of the same
  // length, i.e. q could start s bytes after p starts while p is still seen.
  function automatic bit prefix_overlap(input prefix_t p, input prefix_t q,
                                        input int unsigned s);
    bit same = 1'b1;
    for (int unsigned k = 0; k < BUS_BYTES - s; k++)
      if (p[s + k] != q[k]) same = 1'b0;
    return same;
  endfunction

  // One prefix on its own: bytes 1..3-s may not repeat at shift s = 1, 2, 3.
  function automatic bit prefix_self_ok(input prefix_t p);
    for (int unsigned s = 1; s < BUS_BYTES; s++)
      if (prefix_overlap(p, p, s)) return 1'b0;
    return 1'b1;
  endfunction

  // Two different prefixes of one set: they must differ and neither may
  // overlap the other at any shift.
  function automatic bit prefix_pair_ok(input prefix_t p, input prefix_t q);
    for (int unsigned s = 0; s < BUS_BYTES; s++)
      if (prefix_overlap(p, q, s) || prefix_overlap(q, p, s)) return 1'b0;
    return 1'b1;
  endfunction

endpackage
