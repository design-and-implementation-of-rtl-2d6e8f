// rom_array: the ROM under test, a row decoder plus a cell array.
//
// The ROM has 2**n words. Each stored word is m data bits with one parity
// bit added as its most significant bit, so a cell row is m+1 bits wide.
// The address d[n:1] goes through the two-level decoder; the selected row
// drives the data outputs Out[m:1] (the parity bit is not part of Out).
// Reading is combinational: Out follows d within the cycle.
//
// Besides Out the ROM exposes what the BIST circuitry taps from it:
//  - d_lo, the low-order predecoder outputs D[2**w:1], which address the
//    cells of the BIST logic module, and
//  - cell_out, every stored row including its parity bit, for the parity
//    error detector.
//
// DATA is the programmed content (word j in bits [j*m +: m]); PARITY holds
// the parity bit written beside each word when the ROM was programmed. Both
// are parameters so that a faulty ROM (DATA disagreeing with the content the
// parity was computed for) can be modelled. The default content is word
// j = j, and the default parity is odd parity over that content; both
// defaults, and the combinational read, are this design's choices, while the
// parity MSB and the taps for the BIST unit follow the published scheme.
module rom_array #(
  parameter int unsigned N          = 5,
  parameter int unsigned W_BITS     = 3,
  parameter int unsigned M          = 5,
  parameter bit          ODD_PARITY = 1'b1,
  parameter logic [(2**N)*M-1:0] DATA   = identity_image(),
  parameter logic [2**N-1:0]     PARITY = parity_image(identity_image())
) (
  input  logic [N-1:0]             d,         // ROM inputs d[n:1]
  output logic [M-1:0]             dout,      // Out[m:1]
  output logic [2**W_BITS-1:0]     d_lo,      // predecoder outputs D[8:1]
  output logic [(2**N)*(M+1)-1:0]  cell_out   // all rows {parity, data}
);

  // word j holds the value j (truncated or zero-extended to m bits)
  function automatic logic [(2**N)*M-1:0] identity_image();
    logic [(2**N)*M-1:0] img;
    for (int j = 0; j < 2**N; j++) img[j*M +: M] = M'(j);
    return img;
  endfunction

  // parity bit of each word: total number of ones in {p, word} made odd
  // (ODD_PARITY = 1) or even (ODD_PARITY = 0)
  function automatic logic [2**N-1:0] parity_image(input logic [(2**N)*M-1:0] img);
    logic [2**N-1:0] p;
    for (int j = 0; j < 2**N; j++) p[j] = (^img[j*M +: M]) ^ ODD_PARITY;
    return p;
  endfunction

  logic [2**N-1:0] d2;   // D2[32:1]
  logic [M:0]      rows [2**N];

  two_level_decoder #(.N(N), .W_BITS(W_BITS)) u_dec (
    .d     (d),
    .d1_hi (),
    .d_lo  (d_lo),
    .d2    (d2)
  );

  for (genvar j = 0; j < 2**N; j++) begin : g_row
    assign rows[j] = {PARITY[j], DATA[j*M +: M]};
    assign cell_out[j*(M+1) +: M+1] = rows[j];
  end

  // the selected row drives the output lines (wired-OR of one-hot rows)
  always_comb begin
    dout = '0;
    for (int j = 0; j < 2**N; j++)
      if (d2[j]) dout |= rows[j][M-1:0];
  end

endmodule
