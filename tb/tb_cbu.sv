// tb_cbu: the concurrent BIST unit with the testbench standing in for the
// ROM input multiplexer and the ROM predecoder. First a complete test in
// test mode straight after reset, whose length is checked: 2**w cycles of
// initialisation, then 2**n vectors plus one tge cycle per window. Then
// random normal-mode traffic with test-mode stretches that start at window
// boundaries, compared cycle by cycle with a behavioural reference.
module tb_cbu;
  import bist_pkg::*;
  import bist_ref_pkg::*;
  localparam int unsigned N = 5, W_BITS = 3, K = N - W_BITS;
  localparam int unsigned W = 2**W_BITS;

  logic clk = 0, rst;
  tn_mode_e tn;
  logic [N-1:0] a, d, tg;
  logic [W-1:0] d_lo;
  logic rve, tge, init, t_even, test_done;
  int checks = 0, failures = 0;
  int n_hit = 0, n_repeat = 0, n_outside = 0, n_window = 0, n_done = 0, n_test = 0;
  int done_cycle;
  bit tnb;
  bist_ref #(W_BITS, K) ref_m;

  // multiplexer and predecoder of the surrounding design
  assign d    = (tn == MODE_TEST || init) ? tg : a;
  assign d_lo = W'(1) << d[W_BITS-1:0];

  cbu #(.N(N), .W_BITS(W_BITS)) dut (
    .clk(clk), .rst(rst), .tn(tn), .d_hi(d[N-1:W_BITS]), .d_lo(d_lo),
    .tg(tg), .rve(rve), .tge(tge), .init(init), .t_even(t_even), .test_done(test_done));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // one clock with the reference alongside
  task automatic cycle(input int cyc);
    #1;
    tnb = (tn == MODE_TEST);
    check($sformatf("cyc %0d d=%0d exp %0d", cyc, d, ref_m.vec(tnb, 32'(a))), d === N'(ref_m.vec(tnb, 32'(a))));
    check($sformatf("cyc %0d rve=%b", cyc, rve), rve === ref_m.rve(tnb, 32'(a)));
    check($sformatf("cyc %0d tge=%b", cyc, tge), tge === ref_m.tge);
    check($sformatf("cyc %0d test_done=%b", cyc, test_done), test_done === ref_m.test_done());
    check($sformatf("cyc %0d init=%b", cyc, init), init === ref_m.init);
    if (!ref_m.init && !ref_m.tge) begin
      if (!ref_m.in_window(tnb, 32'(a))) n_outside++;
      else if (ref_m.rve(tnb, 32'(a))) n_hit++;
      else n_repeat++;
      if (tnb) n_test++;
    end
    if (ref_m.tge) n_window++;
    if (test_done) n_done++;
    @(posedge clk);
    ref_m.clock(tnb, 32'(a));
    #1;
  endtask

  initial begin
    ref_m = new();
    rst = 1; tn = MODE_TEST; a = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // complete test in test mode from reset
    done_cycle = -1;
    for (int cyc = 0; cyc < 60 && done_cycle < 0; cyc++) begin
      #1;
      if (test_done) done_cycle = cyc;
      #0 cycle(cyc);
    end
    check($sformatf("test mode test ended at cycle %0d, expected %0d", done_cycle,
                    W + 2**N + 2**K - 1), done_cycle == W + 2**N + 2**K - 1);
    // normal traffic, test mode entered only at window boundaries
    tn = MODE_NORMAL;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      a = N'($urandom);
      if (ref_m.tge) tn = ($urandom % 4 == 0) ? MODE_TEST : MODE_NORMAL;
      else if (tn == MODE_TEST && $urandom % 6 == 0) tn = MODE_NORMAL;
      cycle(cyc);
    end
    check("no hit", n_hit > 0);
    check("no repeat", n_repeat > 0);
    check("no vector outside the window", n_outside > 0);
    check("no window completed", n_window > 0);
    check("test never completed", n_done > 1);
    check("no test mode", n_test > 0);
    $display("hits=%0d repeats=%0d outside=%0d windows=%0d done=%0d test=%0d",
             n_hit, n_repeat, n_outside, n_window, n_done, n_test);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
