// test_generator: the k-stage test generator (TG) of the BIST unit.
//
// TG holds the k high-order bits of the window now being examined. Each
// time the logic module reports a full window (tge) it steps to the next
// window; after 2**k windows every one of the 2**n ROM addresses has been
// checked and it raises test_done for that cycle while wrapping back to
// window 0. The sequence is a plain binary count (this design's choice: any
// sequence that visits all 2**k values would do). Synchronous active-high
// reset to window 0; tg_hi changes on the rising clock edge after tge.
module test_generator #(
  parameter int unsigned K = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         tge,        // window complete: advance
  output logic [K-1:0] tg_hi,      // tg[n:w+1]
  output logic         test_done   // tge while on the last window
);

  always_ff @(posedge clk) begin
    if (rst)      tg_hi <= '0;
    else if (tge) tg_hi <= tg_hi + 1'b1;
  end

  assign test_done = tge && !rst && (tg_hi == '1);

endmodule
