// tb_rom_bist_top: end-to-end test of the ROM with its concurrent BIST, at
// the default size (32 x 5 ROM, windows of 8 addresses, odd parity).
//
// After reset it checks the 8-cycle initialisation sweep. It then runs the
// ROM in normal mode on random addresses, switches to test mode at window
// boundaries and back to normal mode in the middle of windows, and compares
// every cycle with a behavioural reference: the address reaching the ROM,
// the ROM output (word j holds j), rve, tge and the end-of-test pulse. At
// each end of test the RV signature must equal the sum of the captured
// words and, for a fault-free ROM, 0 + 1 + ... + 31 = 496 with pass set.
// The parity error detector must flag nothing. The count of each mechanism
// (hit, repeated vector, vector outside the window, window completion, even
// window, test-mode vector, both mode switches, end of test in either mode)
// is printed, and any that never happened counts as a failure.
module tb_rom_bist_top;
  import bist_ref_pkg::*;
  localparam int unsigned N = 5, W_BITS = 3, M = 5, K = N - W_BITS;
  localparam int unsigned W = 2**W_BITS;

  logic clk = 0, rst, tn;
  logic [N-1:0] a, d, tg;
  logic [M-1:0] out;
  logic rve, tge, init, t_even, test_done, rv_done, rv_pass, error_any;
  logic [M+N-1:0] signature;
  logic [2**N-1:0] error_data;

  int checks = 0, failures = 0;
  int n_init = 0, n_hit = 0, n_repeat = 0, n_outside = 0, n_window = 0, n_even = 0;
  int n_test = 0, n_to_test = 0, n_to_normal = 0, n_done_normal = 0, n_done_test = 0, n_pass = 0;
  int unsigned v;
  int sum, exp_sig;
  bit prev_tn;
  bit check_sig;
  bist_ref #(W_BITS, K) ref_m;

  rom_bist_top dut (
    .clk(clk), .rst(rst), .tn(tn), .a(a), .out(out), .d(d), .tg(tg),
    .rve(rve), .tge(tge), .init(init), .t_even(t_even), .test_done(test_done),
    .signature(signature), .rv_done(rv_done), .rv_pass(rv_pass),
    .error_data(error_data), .error_any(error_any));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
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
    ref_m = new();
    rst = 1; tn = 0; a = '0; sum = 0; prev_tn = 0; check_sig = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // mode control: enter test mode at a window boundary, leave it anywhere
      if (cyc > 2000) begin
        if (!tn && ref_m.tge && $urandom % 3 == 0) tn = 1;
        else if (tn && $urandom % 20 == 0) tn = 0;
      end
      a = N'($urandom);
      #1;
      v = ref_m.vec(tn, 32'(a));
      check($sformatf("cyc %0d d=%0d exp %0d", cyc, d, v), d === N'(v));
      check($sformatf("cyc %0d out=%0d exp %0d", cyc, out, v), out === M'(v));
      check($sformatf("cyc %0d rve=%b", cyc, rve), rve === ref_m.rve(tn, 32'(a)));
      check($sformatf("cyc %0d tge=%b", cyc, tge), tge === ref_m.tge);
      check($sformatf("cyc %0d init=%b", cyc, init), init === ref_m.init);
      check($sformatf("cyc %0d test_done=%b", cyc, test_done), test_done === ref_m.test_done());
      check("parity error on a fault-free ROM", error_data === '0 && error_any === 1'b0);
      if (check_sig) begin
        check($sformatf("signature %0d exp %0d", signature, exp_sig),
              signature === (M+N)'(exp_sig) && rv_done === 1'b1);
        check("rv_pass", rv_pass === (exp_sig == 496));
        if (rv_pass) n_pass++;
        check_sig = 0;
      end
      // mechanism counts
      if (ref_m.init) n_init++;
      else if (!ref_m.tge) begin
        if (!ref_m.in_window(tn, 32'(a))) n_outside++;
        else if (ref_m.rve(tn, 32'(a))) begin
          n_hit++;
          if (t_even) n_even++;
          if (tn) n_test++;
        end else n_repeat++;
      end
      if (ref_m.tge) n_window++;
      if (tn && !prev_tn) n_to_test++;
      if (!tn && prev_tn) n_to_normal++;
      prev_tn = tn;
      if (rve) sum += out;
      if (ref_m.test_done()) begin
        if (tn) n_done_test++;
        else n_done_normal++;
        exp_sig = sum % 1024;
        sum = 0;
        check_sig = 1;
      end
      @(posedge clk);
      ref_m.clock(tn, 32'(a));
      #1;
    end
    check($sformatf("init sweep %0d cycles", n_init), n_init == W);
    check("no hit", n_hit > 0);
    check("no repeated vector", n_repeat > 0);
    check("no vector outside the window", n_outside > 0);
    check("no window completed", n_window > 0);
    check("no even window", n_even > 0);
    check("no test-mode hit", n_test > 0);
    check("no switch to test mode", n_to_test > 0);
    check("no switch to normal mode", n_to_normal > 0);
    check("no test completed in normal mode", n_done_normal > 0);
    check("no test completed in test mode", n_done_test > 0);
    check("no passing signature", n_pass > 0);
    $display("init=%0d hits=%0d repeats=%0d outside=%0d windows=%0d even_hits=%0d test_hits=%0d",
             n_init, n_hit, n_repeat, n_outside, n_window, n_even, n_test);
    $display("to_test=%0d to_normal=%0d done_normal=%0d done_test=%0d passes=%0d",
             n_to_test, n_to_normal, n_done_normal, n_done_test, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
