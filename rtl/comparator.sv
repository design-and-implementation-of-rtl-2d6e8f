// comparator: the k-stage comparator (Comp) of the BIST unit.
//
// It compares the k high-order ROM inputs d[n:w+1] with the test generator
// contents tg[n:w+1]; cmp = 1 means the vector now at the ROM inputs belongs
// to the window being examined. Purely combinational. The scheme names a
// k-stage comparator; equality is the natural reading.
module comparator #(
  parameter int unsigned K = 2
) (
  input  logic [K-1:0] d_hi,   // d[n:w+1]
  input  logic [K-1:0] tg_hi,  // tg[n:w+1]
  output logic         cmp
);

  assign cmp = (d_hi == tg_hi);

endmodule
