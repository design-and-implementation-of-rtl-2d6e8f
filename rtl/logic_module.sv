// logic_module: the window-tracking logic of the concurrent BIST unit.
//
// It keeps one SRAM-like cell per vector of the current window (W = 2**w
// cells), a sense amplifier that reads the addressed cell, a toggle
// flip-flop T that says whether an odd or an even window is examined, a
// w-stage counter of the hits, and the flip-flop that turns the counter
// overflow into tge one clock later. The cells are addressed by the one-hot
// low-order predecoder outputs of the ROM (d_lo), so the module needs no
// decoder of its own.
//
// Operation, one vector per clock:
//  - Reset: rst clears T, the counter and tge, and starts an initialisation
//    sweep of W cycles. During the sweep init is 1, the counter supplies the
//    low-order test vector (the surrounding design must route tg to the ROM
//    inputs), and each addressed cell is cleared. After the sweep all cells
//    hold 0 and the first (odd, T = 0) window starts.
//  - Hit: cmp = 1 and the addressed cell equals T (0 in an odd window, 1 in
//    an even one). rve is raised in the same cycle, the counter advances and
//    at the clock edge the cell is written with NOT T.
//  - Repeat: cmp = 1 but the cell already differs from T. No rve, no write.
//  - Window full: the hit that takes the counter from W-1 to 0 is the
//    overflow; tge is high during the next cycle, in which no hit is taken.
//    At the end of that cycle T toggles (and the test generator steps), so
//    the cells, all equal to the old NOT T, read as unvisited again.
//  - Test mode (tn = 1): the counter output is the low-order test vector and
//    advances every cycle except the tge cycle, so it never stalls on an
//    address already seen. Test mode should be entered at a window boundary
//    (while tge is high, or after reset): entered mid-window, the sweep
//    starts at the hit count and skips lower addresses not yet seen.
//
// The cells, the T flip-flop, the hit counter, the hit rule for odd and even
// windows and the one-flip-flop delay from overflow to tge follow the
// published scheme. The clearing sweep, the test-mode counting and T
// toggling together with the test generator are this design's choices.
//
// Timing: rve is combinational from d_lo, cmp and the state; everything else
// changes on the rising clock edge. The original transistor-level circuit reads
// the cell in one half of the clock and writes it in the other; here the read is
// combinational and the write happens at the clock edge, which is the same
// behaviour with a single edge.
module logic_module #(
  parameter int unsigned W_BITS = 3
) (
  input  logic                  clk,
  input  logic                  rst,     // synchronous, active high
  input  logic                  tn,      // T/N: 1 = test mode
  input  logic                  cmp,     // vector is in the current window
  input  logic [2**W_BITS-1:0]  d_lo,    // one-hot cell address D[W:1]
  output logic                  rve,     // response verifier enable (hit)
  output logic                  tge,     // test generator enable
  output logic [W_BITS-1:0]     tg_lo,   // tg[w:1], the counter
  output logic                  init,    // initialisation sweep running
  output logic                  t_even   // T: 0 odd window, 1 even window
);

  localparam int unsigned W = 2**W_BITS;

  logic [W-1:0]      cells;     // one bit per vector of the window
  logic              sa_out;    // sense amplifier output
  logic              t_q;       // T flip-flop
  logic [W_BITS-1:0] cnt_q;     // w-stage counter
  logic              tge_q;     // overflow delayed by one flip-flop
  logic              init_q;
  logic              step;
  logic              ovf;

  // sense amplifier: read the cell selected by the one-hot word line
  assign sa_out = |(cells & d_lo);

  assign rve  = cmp && !init_q && !tge_q && (sa_out == t_q);
  assign step = init_q || rve || (tn && !tge_q);
  assign ovf  = !init_q && step && (cnt_q == W_BITS'(W - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      t_q    <= 1'b0;
      cnt_q  <= '0;
      tge_q  <= 1'b0;
      init_q <= 1'b1;
    end else begin
      if (step) cnt_q <= cnt_q + 1'b1;
      tge_q <= ovf;
      if (tge_q) t_q <= !t_q;
      if (init_q && cnt_q == W_BITS'(W - 1)) init_q <= 1'b0;
    end
  end

  // cell writes: clear during initialisation, write NOT T on a hit
  always_ff @(posedge clk) begin
    if (!rst) begin
      if (init_q)   cells <= cells & ~d_lo;
      else if (rve) cells <= t_q ? (cells & ~d_lo) : (cells | d_lo);
    end
  end

  assign tge    = tge_q || rst;
  assign tg_lo  = cnt_q;
  assign init   = init_q;
  assign t_even = t_q;

  // the word lines of a decoder never select two cells at once
  a_onehot_wordline: assert property (@(posedge clk) disable iff (rst) $onehot0(d_lo));

endmodule
