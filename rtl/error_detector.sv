// error_detector: parity-based error detecting unit (ED) for the ROM.
//
// Every ROM row is stored as {parity bit, m data bits}, the parity bit
// being the most significant. The unit checks all rows at once: row j is in
// error when the number of ones in the whole row is not odd (ODD_PARITY = 1)
// or not even (ODD_PARITY = 0), which is an XOR over the row. error_data has
// one bit per ROM word, so its bit position tells which word is corrupted;
// it is all zeros for a fault-free ROM. The parity MSB and the per-word
// error vector follow the published scheme; checking all rows at once and
// the default of odd parity are choices of this design. Combinational.
module error_detector #(
  parameter int unsigned N          = 5,
  parameter int unsigned M          = 5,
  parameter bit          ODD_PARITY = 1'b1
) (
  input  logic [(2**N)*(M+1)-1:0] cell_out,    // all rows {parity, data}
  output logic [2**N-1:0]         error_data,  // bit j: word j in error
  output logic                    error_any
);

  for (genvar j = 0; j < 2**N; j++) begin : g_chk
    assign error_data[j] = (^cell_out[j*(M+1) +: M+1]) ^ ODD_PARITY;
  end

  assign error_any = |error_data;

endmodule
