// tb_rom_bist_top_fault: the complete design built around a faulty ROM. Word
// 13 should hold 13 but has bit 2 flipped and so holds 9, while its parity
// bit is the one computed for 13. The parity error detector must flag word
// 13 and no other, the normal-mode read of address 13 returns 9, and the
// BIST, run in test mode from reset, must end with signature 496 - 4 = 492
// and pass low. A second instance with the correct content, tested the
// same way, must pass, which ties the failure to the fault.
module tb_rom_bist_top_fault;
  localparam int unsigned N = 5, W_BITS = 3, M = 5;
  localparam int unsigned FAULT_WORD = 13, FAULT_BIT = 2;

  function automatic logic [(2**N)*M-1:0] image(input bit faulty);
    logic [(2**N)*M-1:0] img;
    for (int j = 0; j < 2**N; j++) img[j*M +: M] = M'(j);
    if (faulty) img[FAULT_WORD*M + FAULT_BIT] = ~img[FAULT_WORD*M + FAULT_BIT];
    return img;
  endfunction

  logic clk = 0, rst, tn;
  logic [N-1:0] a;
  logic [M-1:0] out_f, out_g;
  logic done_f, done_g, rvd_f, rvd_g, pass_f, pass_g, any_f, any_g;
  logic [M+N-1:0] sig_f, sig_g;
  logic [2**N-1:0] err_f, err_g;
  int checks = 0, failures = 0;
  int cycles;

  rom_bist_top #(.ROM_DATA(image(1'b1))) dut_f (
    .clk(clk), .rst(rst), .tn(tn), .a(a), .out(out_f), .d(), .tg(),
    .rve(), .tge(), .init(), .t_even(), .test_done(done_f),
    .signature(sig_f), .rv_done(rvd_f), .rv_pass(pass_f),
    .error_data(err_f), .error_any(any_f));

  rom_bist_top dut_g (
    .clk(clk), .rst(rst), .tn(tn), .a(a), .out(out_g), .d(), .tg(),
    .rve(), .tge(), .init(), .t_even(), .test_done(done_g),
    .signature(sig_g), .rv_done(rvd_g), .rv_pass(pass_g),
    .error_data(err_g), .error_any(any_g));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("%t %s", $time, what);
    end
  endtask

  initial begin
    rst = 1; tn = 1; a = '0;
    #1;
    check($sformatf("error_data %b", err_f), err_f === (32'd1 << FAULT_WORD) && any_f === 1'b1);
    check($sformatf("good ROM error_data %b", err_g), err_g === '0 && any_g === 1'b0);
    repeat (3) @(posedge clk);
    #1 rst = 0;
    cycles = 0;
    while (!done_f && cycles < 200) begin
      @(posedge clk);
      #1 cycles++;
    end
    check("both copies end the test together", done_g === 1'b1);
    @(posedge clk);
    #1;
    check($sformatf("faulty signature %0d", sig_f), sig_f === 10'd492 && rvd_f && !pass_f);
    check($sformatf("good signature %0d", sig_g), sig_g === 10'd496 && rvd_g && pass_g);
    // normal-mode read of the faulty word
    tn = 0;
    a  = N'(FAULT_WORD);
    #1;
    check($sformatf("faulty word reads %0d", out_f), out_f === M'(FAULT_WORD ^ (1 << FAULT_BIT)));
    check($sformatf("good word reads %0d", out_g), out_g === M'(FAULT_WORD));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
