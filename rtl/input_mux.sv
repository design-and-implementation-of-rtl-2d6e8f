// input_mux: the n-stage multiplexer in front of the ROM inputs.
//
// It drives the ROM address d[n:1] either from the normal input vector A
// (normal mode) or from the test vector tg[n:1] produced by the concurrent
// BIST unit (test mode). The select is T/N; in this design the BIST unit may
// also claim the ROM inputs while it initialises its cells after reset
// (force_tg), which follows the description of the reset sequence, where the
// tg outputs are applied to the ROM inputs. Purely combinational.
module input_mux
  import bist_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  tn_mode_e       tn,        // T/N: MODE_NORMAL or MODE_TEST
  input  logic           force_tg,  // BIST unit initialising its cells
  input  logic [N-1:0]   a,         // normal input vector A[n:1]
  input  logic [N-1:0]   tg,        // test vector tg[n:1]
  output logic [N-1:0]   d          // ROM inputs d[n:1]
);

  always_comb begin
    if (tn == MODE_TEST || force_tg) d = tg;
    else                             d = a;
  end

endmodule
