// response_verifier: order-independent response verifier (RV).
//
// In normal mode the vectors of a window reach the ROM in whatever order the
// system happens to use them, so the verifier must give the same result for
// any order. This one adds every captured ROM response into an accumulator
// of m + n bits (addition is order independent, and m + n bits hold the sum
// of all 2**n words without wrapping). When examine is high the accumulated
// signature is latched into signature, compared with GOLDEN (the sum of the
// fault-free ROM contents) into pass, and the accumulator starts again from
// zero. A capture in the same cycle as examine is not lost: it is included.
//
// The scheme asks only for an order-independent verifier of m stages; the
// adder and its m + n bit width are this design's choice.
//
// Timing: capture and examine take effect on the rising clock edge; done,
// pass and signature are registered and hold until the next examine.
module response_verifier #(
  parameter int unsigned M    = 5,
  parameter int unsigned N    = 5,
  parameter logic [M+N-1:0] GOLDEN = '0
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           rve,        // capture resp this cycle
  input  logic [M-1:0]   resp,       // ROM output Out[m:1]
  input  logic           examine,    // all vectors have hit: check now
  output logic [M+N-1:0] signature,  // last examined signature
  output logic           done,       // at least one examination made
  output logic           pass        // last signature equalled GOLDEN
);

  logic [M+N-1:0] acc_q;
  logic [M+N-1:0] acc_next;

  assign acc_next = rve ? acc_q + (M+N)'(resp) : acc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q     <= '0;
      signature <= '0;
      done      <= 1'b0;
      pass      <= 1'b0;
    end else if (examine) begin
      acc_q     <= '0;
      signature <= acc_next;
      done      <= 1'b1;
      pass      <= (acc_next == GOLDEN);
    end else begin
      acc_q     <= acc_next;
    end
  end

endmodule
