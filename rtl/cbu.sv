// cbu: the concurrent BIST unit, test generator + comparator + logic module.
//
// The unit watches the address d[n:1] at the ROM inputs. Its k high-order
// bits (d_hi) are compared with the test generator (TG) to tell whether the vector
// belongs to the window under examination; the w low-order bits reach the
// logic module already decoded, as the ROM's own predecoder outputs d_lo.
// The unit produces rve (capture the ROM response), the test vector
// tg[n:1] = {TG, counter} used in test mode and during initialisation, and
// test_done when the last of the 2**k windows is complete, that is when
// every ROM address has been exercised once. All outputs except rve and tge
// are registered; rve is combinational from d_hi and d_lo. The grouping and
// the composition of tg follow the published scheme; test_done is this
// design's addition.
module cbu
  import bist_pkg::*;
#(
  parameter int unsigned N      = N_DEF,
  parameter int unsigned W_BITS = W_BITS_DEF
) (
  input  logic                 clk,
  input  logic                 rst,
  input  tn_mode_e             tn,
  input  logic [N-W_BITS-1:0]  d_hi,       // d[n:w+1] at the ROM inputs
  input  logic [2**W_BITS-1:0] d_lo,       // ROM predecoder outputs
  output logic [N-1:0]         tg,         // test vector tg[n:1]
  output logic                 rve,
  output logic                 tge,
  output logic                 init,
  output logic                 t_even,
  output logic                 test_done
);

  localparam int unsigned K = N - W_BITS;

  logic [K-1:0]      tg_hi;
  logic [W_BITS-1:0] tg_lo;
  logic              cmp;

  test_generator #(.K(K)) u_tg (
    .clk       (clk),
    .rst       (rst),
    .tge       (tge),
    .tg_hi     (tg_hi),
    .test_done (test_done)
  );

  comparator #(.K(K)) u_cmp (
    .d_hi  (d_hi),
    .tg_hi (tg_hi),
    .cmp   (cmp)
  );

  logic_module #(.W_BITS(W_BITS)) u_logic (
    .clk    (clk),
    .rst    (rst),
    .tn     (tn == MODE_TEST),
    .cmp    (cmp),
    .d_lo   (d_lo),
    .rve    (rve),
    .tge    (tge),
    .tg_lo  (tg_lo),
    .init   (init),
    .t_even (t_even)
  );

  assign tg = {tg_hi, tg_lo};

endmodule
