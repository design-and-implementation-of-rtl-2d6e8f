// tb_error_detector: builds random ROM images with correct parity, for odd
// and even parity, and checks that no error is flagged; then flips one
// random bit (data or parity) of one random word and checks that exactly
// that word's error bit is set.
module tb_error_detector;
  localparam int unsigned N = 5, M = 5;
  localparam int unsigned R = M + 1;
  logic [(2**N)*R-1:0] img_odd, img_even;
  logic [2**N-1:0] err_odd, err_even;
  logic any_odd, any_even;
  int checks = 0, failures = 0;
  int w, b;
  logic [M-1:0] data;

  error_detector #(.N(N), .M(M), .ODD_PARITY(1'b1)) dut_odd
    (.cell_out(img_odd), .error_data(err_odd), .error_any(any_odd));
  error_detector #(.N(N), .M(M), .ODD_PARITY(1'b0)) dut_even
    (.cell_out(img_even), .error_data(err_even), .error_any(any_even));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      for (int j = 0; j < 2**N; j++) begin
        data = M'($urandom);
        // parity bit chosen so the count of ones is odd / even
        img_odd[j*R +: R]  = {~(^data), data};
        img_even[j*R +: R] = {(^data), data};
      end
      #1;
      checks += 2;
      if (err_odd !== '0 || any_odd !== 1'b0) begin
        failures++;
        $display("odd: false error %b", err_odd);
      end
      if (err_even !== '0 || any_even !== 1'b0) begin
        failures++;
        $display("even: false error %b", err_even);
      end
      w = $urandom % (2**N);
      b = $urandom % R;
      img_odd[w*R + b]  = ~img_odd[w*R + b];
      img_even[w*R + b] = ~img_even[w*R + b];
      #1;
      checks += 2;
      if (err_odd !== (32'd1 << w) || any_odd !== 1'b1) begin
        failures++;
        $display("odd: word %0d bit %0d flipped, error_data=%b", w, b, err_odd);
      end
      if (err_even !== (32'd1 << w) || any_even !== 1'b1) begin
        failures++;
        $display("even: word %0d bit %0d flipped, error_data=%b", w, b, err_even);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
