// tb_two_level_decoder: exhaustive check of the 5-to-32 two-level decoder:
// every address selects exactly its own word line, and the predecoder
// outputs are the one-hot codes of the high and low address fields.
module tb_two_level_decoder;
  localparam int unsigned N = 5, W_BITS = 3;
  logic [N-1:0] d;
  logic [2**(N-W_BITS)-1:0] d1_hi;
  logic [2**W_BITS-1:0] d_lo;
  logic [2**N-1:0] d2;
  int checks = 0, failures = 0;

  two_level_decoder #(.N(N), .W_BITS(W_BITS)) dut (.d(d), .d1_hi(d1_hi), .d_lo(d_lo), .d2(d2));

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
      checks += 3;
      if (d2 !== (32'd1 << a)) begin
        failures++;
        $display("addr %0d: d2=%b", a, d2);
      end
      if (d_lo !== (8'd1 << (a % 8))) begin
        failures++;
        $display("addr %0d: d_lo=%b", a, d_lo);
      end
      if (d1_hi !== (4'd1 << (a / 8))) begin
        failures++;
        $display("addr %0d: d1_hi=%b", a, d1_hi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
