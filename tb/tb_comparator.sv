// tb_comparator: exhaustive check of the window comparator.
module tb_comparator;
  localparam int unsigned K = 2;
  logic [K-1:0] d_hi, tg_hi;
  logic cmp;
  int checks = 0, failures = 0;

  comparator #(.K(K)) dut (.d_hi(d_hi), .tg_hi(tg_hi), .cmp(cmp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 2**K; x++)
      for (int y = 0; y < 2**K; y++) begin
        d_hi  = K'(x);
        tg_hi = K'(y);
        #1;
        checks++;
        if (cmp !== (x == y)) begin
          failures++;
          $display("mismatch d_hi=%0d tg_hi=%0d cmp=%b", x, y, cmp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
