// rom_bist_top: a ROM with input-vector-monitoring concurrent BIST and a
// parity error detector.
//
// The ROM is tested while the system uses it. Every address that reaches
// the ROM inputs in normal operation is also watched by the concurrent BIST
// unit (CBU). Addresses are examined in windows of 2**w consecutive
// addresses; the first time an address of the current window appears, the
// CBU raises rve and the response verifier (RV) adds the ROM output to its
// signature. When all addresses of a window have appeared, the CBU moves to
// the next window; after the last window every address has been read once
// and the RV signature is compared with the fault-free value. The CBU needs
// no decoder of its own: it reuses the ROM's low-order predecoder outputs to
// address its cells. In test mode (tn = 1) the CBU drives the ROM inputs
// itself and walks through the windows one address per clock. After reset
// the CBU spends 2**w cycles clearing its cells, during which it also owns
// the ROM inputs (init = 1).
//
// Independently, the error detector checks the parity bit stored with each
// ROM word and flags, per word, any word whose parity is wrong.
//
// Parameters: N address bits, W_BITS bits per window, M data bits,
// ODD_PARITY selects odd or even parity, EXPECT_DATA is the content the ROM
// was meant to hold (the parity bits and the golden signature are derived
// from it) and ROM_DATA is what it actually holds; they differ only when a
// faulty ROM is modelled. Ports are plain signals; out follows a (or the test
// vector) combinationally, rve is combinational, all status outputs are
// registered. Reset is synchronous and active high. The block structure
// follows the published scheme; the reset sweep, the result flags and the
// ROM_DATA / EXPECT_DATA split for fault modelling are this design's.
module rom_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N          = N_DEF,
  parameter int unsigned W_BITS     = W_BITS_DEF,
  parameter int unsigned M          = M_DEF,
  parameter bit          ODD_PARITY = 1'b1,
  parameter logic [(2**N)*M-1:0] EXPECT_DATA = identity_image(),
  parameter logic [(2**N)*M-1:0] ROM_DATA    = EXPECT_DATA
) (
  input  logic              clk,
  input  logic              rst,          // synchronous, active high
  input  logic              tn,           // T/N: 0 normal, 1 test
  input  logic [N-1:0]      a,            // normal input vector A[n:1]
  output logic [M-1:0]      out,          // ROM outputs Out[m:1]
  output logic [N-1:0]      d,            // address applied to the ROM
  output logic [N-1:0]      tg,           // CBU test vector tg[n:1]
  output logic              rve,          // response captured this cycle
  output logic              tge,          // window complete
  output logic              init,         // CBU clearing its cells
  output logic              t_even,       // even-numbered window
  output logic              test_done,    // last window complete (pulse)
  output logic [M+N-1:0]    signature,    // last examined RV signature
  output logic              rv_done,      // a signature has been examined
  output logic              rv_pass,      // that signature was fault-free
  output logic [2**N-1:0]   error_data,   // per-word parity error
  output logic              error_any
);

  function automatic logic [(2**N)*M-1:0] identity_image();
    logic [(2**N)*M-1:0] img;
    for (int j = 0; j < 2**N; j++) img[j*M +: M] = M'(j);
    return img;
  endfunction

  function automatic logic [2**N-1:0] parity_image(input logic [(2**N)*M-1:0] img);
    logic [2**N-1:0] p;
    for (int j = 0; j < 2**N; j++) p[j] = (^img[j*M +: M]) ^ ODD_PARITY;
    return p;
  endfunction

  // sum of all words: the RV signature of a fault-free ROM
  function automatic logic [M+N-1:0] golden_sum(input logic [(2**N)*M-1:0] img);
    logic [M+N-1:0] s;
    s = '0;
    for (int j = 0; j < 2**N; j++) s += (M+N)'(img[j*M +: M]);
    return s;
  endfunction

  tn_mode_e                tn_mode;
  logic [2**W_BITS-1:0]    d_lo;
  logic [(2**N)*(M+1)-1:0] cell_out;

  assign tn_mode = tn_mode_e'(tn);

  input_mux #(.N(N)) u_mux (
    .tn       (tn_mode),
    .force_tg (init),
    .a        (a),
    .tg       (tg),
    .d        (d)
  );

  rom_array #(
    .N          (N),
    .W_BITS     (W_BITS),
    .M          (M),
    .ODD_PARITY (ODD_PARITY),
    .DATA       (ROM_DATA),
    .PARITY     (parity_image(EXPECT_DATA))
  ) u_rom (
    .d        (d),
    .dout     (out),
    .d_lo     (d_lo),
    .cell_out (cell_out)
  );

  cbu #(.N(N), .W_BITS(W_BITS)) u_cbu (
    .clk       (clk),
    .rst       (rst),
    .tn        (tn_mode),
    .d_hi      (d[N-1:W_BITS]),
    .d_lo      (d_lo),
    .tg        (tg),
    .rve       (rve),
    .tge       (tge),
    .init      (init),
    .t_even    (t_even),
    .test_done (test_done)
  );

  response_verifier #(
    .M      (M),
    .N      (N),
    .GOLDEN (golden_sum(EXPECT_DATA))
  ) u_rv (
    .clk       (clk),
    .rst       (rst),
    .rve       (rve),
    .resp      (out),
    .examine   (test_done),
    .signature (signature),
    .done      (rv_done),
    .pass      (rv_pass)
  );

  error_detector #(
    .N          (N),
    .M          (M),
    .ODD_PARITY (ODD_PARITY)
  ) u_ed (
    .cell_out   (cell_out),
    .error_data (error_data),
    .error_any  (error_any)
  );

endmodule
