// bist_ref_pkg: a behavioural reference of the window-monitoring BIST, used
// by the testbenches to predict rve, tge, the test vector and the end of a
// test. It is written from the description of the scheme, not from the RTL:
// the window is a set of visited addresses instead of cells and a toggle
// flip-flop, and a window is complete after the counter has advanced 2**w
// times (2**w hits in normal mode).
package bist_ref_pkg;

  class bist_ref #(int unsigned W_BITS = 3, int unsigned K = 2);
    localparam int unsigned W = 2**W_BITS;

    bit init;           // clearing sweep after reset
    int unsigned cnt;   // low-order test vector / hit counter
    int unsigned tg;    // window under examination
    bit visited[W];
    bit tge;            // cycle after the window was completed

    function new();
      reset();
    endfunction

    function void reset();
      init = 1;
      cnt  = 0;
      tg   = 0;
      tge  = 0;
      foreach (visited[i]) visited[i] = 0;
    endfunction

    // address at the ROM inputs for normal input a
    function int unsigned vec(bit tn, int unsigned a);
      return (tn || init) ? tg * W + cnt : a;
    endfunction

    function bit in_window(bit tn, int unsigned a);
      return (vec(tn, a) / W) == tg;
    endfunction

    function bit rve(bit tn, int unsigned a);
      int unsigned v = vec(tn, a);
      return !init && !tge && in_window(tn, a) && !visited[v % W];
    endfunction

    function bit test_done();
      return tge && tg == 2**K - 1;
    endfunction

    // advance one clock with mode tn and normal input a
    function void clock(bit tn, int unsigned a);
      int unsigned v = vec(tn, a);
      bit hit = rve(tn, a);
      bit step;
      if (init) begin
        cnt++;
        if (cnt == W) begin
          cnt  = 0;
          init = 0;
        end
      end else if (tge) begin
        tge = 0;
        tg  = (tg + 1) % (2**K);
        foreach (visited[i]) visited[i] = 0;
      end else begin
        if (hit) visited[v % W] = 1;
        step = hit || tn;
        if (step) begin
          if (cnt == W - 1) tge = 1;
          cnt = (cnt + 1) % W;
        end
      end
    endfunction
  endclass

endpackage
