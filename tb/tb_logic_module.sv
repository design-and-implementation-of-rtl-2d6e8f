// tb_logic_module: runs the logic module with the testbench acting as test
// generator, comparator and ROM decoder. After reset it checks the
// initialisation sweep of 2**w cycles, then drives random addresses in
// normal mode and stretches of test mode (entered at window boundaries) and
// compares rve, tge, the counter output and T with a behavioural reference.
// It counts hits, repeated vectors, vectors outside the window, completed
// windows, even windows and test-mode cycles, and fails if any never occurs.
module tb_logic_module;
  import bist_ref_pkg::*;
  localparam int unsigned W_BITS = 3, K = 2, N = W_BITS + K;
  localparam int unsigned W = 2**W_BITS;

  logic clk = 0, rst, tn, cmp;
  logic [W-1:0] d_lo;
  logic rve, tge, init, t_even;
  logic [W_BITS-1:0] tg_lo;
  int checks = 0, failures = 0;
  int n_hit = 0, n_repeat = 0, n_outside = 0, n_window = 0, n_even = 0, n_test = 0;
  int init_cycles;
  int unsigned a, v;
  bit exp_rve;
  bit exp_even;
  bist_ref #(W_BITS, K) ref_m;

  logic_module #(.W_BITS(W_BITS)) dut (
    .clk(clk), .rst(rst), .tn(tn), .cmp(cmp), .d_lo(d_lo),
    .rve(rve), .tge(tge), .tg_lo(tg_lo), .init(init), .t_even(t_even));

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

  initial begin
    ref_m = new();
    exp_even = 0;
    rst = 1; tn = 0; cmp = 0; d_lo = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    init_cycles = 0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // test mode in stretches that start at a window boundary
      if (!ref_m.init && ref_m.tge && cyc > 1500) tn = 1'($urandom % 2);
      a   = $urandom % (2**N);
      v   = ref_m.vec(tn, 32'(a));
      cmp = ref_m.in_window(tn, 32'(a));
      d_lo = W'(1) << (v % W);
      #1;
      exp_rve = ref_m.rve(tn, 32'(a));
      check($sformatf("init=%b exp %b", init, ref_m.init), init === ref_m.init);
      check($sformatf("rve=%b exp %b (v=%0d)", rve, exp_rve, v), rve === exp_rve);
      check($sformatf("tge=%b exp %b", tge, ref_m.tge), tge === ref_m.tge);
      check($sformatf("tg_lo=%0d exp %0d", tg_lo, ref_m.cnt), tg_lo === W_BITS'(ref_m.cnt));
      check("t_even", t_even === exp_even);
      if (ref_m.init) init_cycles++;
      else if (!ref_m.tge) begin
        if (!cmp) n_outside++;
        else if (exp_rve) begin
          n_hit++;
          if (t_even) n_even++;
        end else n_repeat++;
        if (tn) n_test++;
      end
      if (ref_m.tge) begin
        n_window++;
        exp_even = !exp_even;
      end
      @(posedge clk);
      ref_m.clock(tn, 32'(a));
      #1;
    end
    check($sformatf("init sweep took %0d cycles", init_cycles), init_cycles == W);
    check("no hit", n_hit > 0);
    check("no repeated vector", n_repeat > 0);
    check("no vector outside the window", n_outside > 0);
    check("no completed window", n_window > 0);
    check("no even window", n_even > 0);
    check("no test-mode cycle", n_test > 0);
    $display("hits=%0d repeats=%0d outside=%0d windows=%0d even_hits=%0d test=%0d",
             n_hit, n_repeat, n_outside, n_window, n_even, n_test);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
