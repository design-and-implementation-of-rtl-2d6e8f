// tb_test_generator: drives random tge pulses and checks the window count
// and the test_done pulse on the last window against a counting model.
module tb_test_generator;
  localparam int unsigned K = 2;
  logic clk = 0, rst, tge;
  logic [K-1:0] tg_hi;
  logic test_done;
  int checks = 0, failures = 0;
  int model, dones;

  test_generator #(.K(K)) dut (.clk(clk), .rst(rst), .tge(tge), .tg_hi(tg_hi), .test_done(test_done));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; tge = 0; model = 0; dones = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 300; i++) begin
      tge = ($urandom % 3) == 0;
      #1;
      checks++;
      if (tg_hi !== K'(model) || test_done !== (tge && model == 2**K - 1)) begin
        failures++;
        $display("cycle %0d: tg_hi=%0d model=%0d test_done=%b", i, tg_hi, model, test_done);
      end
      if (test_done) dones++;
      @(posedge clk);
      if (tge) model = (model + 1) % (2**K);
      #1;
    end
    checks++;
    if (dones == 0) begin
      failures++;
      $display("test_done never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
