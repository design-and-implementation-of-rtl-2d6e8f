// two_level_decoder: the ROM row decoder, built in two levels.
//
// The n address bits are split like the BIST window: the k high-order bits
// drive a k-to-2**k predecoder (outputs D[1.x]) and the w low-order bits a
// w-to-2**w predecoder (outputs D[x]). One AND gate per word combines them:
// word j is selected when D[1.(j >> w)] and D[j mod 2**w] are both 1. For
// n = 5, w = 3 this is a 2-to-4 and a 3-to-8 predecoder and 32 AND gates.
// The low-order predecoder outputs are brought out so that the BIST logic
// module can use them instead of a decoder of its own. Combinational.
// The structure is the published two-level 5-to-32 decoder; the
// generalisation to other n and w is this design's.
module two_level_decoder #(
  parameter int unsigned N      = 5,
  parameter int unsigned W_BITS = 3
) (
  input  logic [N-1:0]             d,       // address d[n:1]
  output logic [2**(N-W_BITS)-1:0] d1_hi,   // D[1.4:1.1], one-hot
  output logic [2**W_BITS-1:0]     d_lo,    // D[8:1], one-hot
  output logic [2**N-1:0]          d2       // D2[32:1], one-hot
);

  always_comb begin
    d1_hi = '0;
    d1_hi[d[N-1:W_BITS]] = 1'b1;
    d_lo = '0;
    d_lo[d[W_BITS-1:0]] = 1'b1;
  end

  for (genvar j = 0; j < 2**N; j++) begin : g_and
    assign d2[j] = d1_hi[j >> W_BITS] & d_lo[j % (2**W_BITS)];
  end

endmodule
