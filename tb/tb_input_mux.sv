// tb_input_mux: checks the ROM input multiplexer on random vectors in both
// modes and with the initialisation override.
module tb_input_mux;
  import bist_pkg::*;
  localparam int unsigned N = 5;
  tn_mode_e     tn;
  logic         force_tg;
  logic [N-1:0] a, tg, d, exp_d;
  int checks = 0, failures = 0;

  input_mux #(.N(N)) dut (.tn(tn), .force_tg(force_tg), .a(a), .tg(tg), .d(d));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      a        = N'($urandom);
      tg       = N'($urandom);
      tn       = tn_mode_e'(i[0]);
      force_tg = i[1] & i[2];
      #1;
      exp_d = (i[0] || (i[1] && i[2])) ? tg : a;
      checks++;
      if (d !== exp_d) begin
        failures++;
        $display("mismatch: tn=%0d force=%0d a=%b tg=%b d=%b", tn, force_tg, a, tg, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
