// tb_rom_array: reads every word of the default ROM (word j holds j) and
// checks the output, the predecoder outputs handed to the BIST unit, and
// the stored rows with their odd-parity bit.
module tb_rom_array;
  localparam int unsigned N = 5, W_BITS = 3, M = 5;
  logic [N-1:0] d;
  logic [M-1:0] dout;
  logic [2**W_BITS-1:0] d_lo;
  logic [(2**N)*(M+1)-1:0] cell_out;
  int checks = 0, failures = 0;
  int ones;

  rom_array #(.N(N), .W_BITS(W_BITS), .M(M)) dut (.d(d), .dout(dout), .d_lo(d_lo), .cell_out(cell_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**N; a++) begin
      d = N'(a);
      #1;
      checks += 4;
      if (dout !== M'(a)) begin
        failures++;
        $display("addr %0d: dout=%0d", a, dout);
      end
      if (d_lo !== (8'd1 << (a % 8))) begin
        failures++;
        $display("addr %0d: d_lo=%b", a, d_lo);
      end
      if (cell_out[a*(M+1) +: M] !== M'(a)) begin
        failures++;
        $display("row %0d data wrong", a);
      end
      ones = $countones(cell_out[a*(M+1) +: M+1]);
      if (ones % 2 != 1) begin
        failures++;
        $display("row %0d parity not odd", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
