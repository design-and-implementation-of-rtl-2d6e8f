// tb_response_verifier: feeds random responses with random capture enables,
// examines at random points and checks the signature (sum of the captured
// responses) and the pass flag against a model. A second instance gets the
// 32 words 0..31 in a shuffled order and must report the same signature
// (496) and pass, which is the order independence the design relies on.
module tb_response_verifier;
  localparam int unsigned M = 5, N = 5;
  logic clk = 0, rst, rve, examine;
  logic [M-1:0] resp;
  logic [M+N-1:0] sig;
  logic done, pass;
  logic rve2, ex2;
  logic [M-1:0] resp2;
  logic [M+N-1:0] sig2;
  logic done2, pass2;
  int checks = 0, failures = 0;
  int model_acc, model_sig;
  int order[32];
  int tmp, k;

  localparam logic [M+N-1:0] GOLD = 10'd496;

  response_verifier #(.M(M), .N(N), .GOLDEN(GOLD)) dut (
    .clk(clk), .rst(rst), .rve(rve), .resp(resp), .examine(examine),
    .signature(sig), .done(done), .pass(pass));
  response_verifier #(.M(M), .N(N), .GOLDEN(GOLD)) dut2 (
    .clk(clk), .rst(rst), .rve(rve2), .resp(resp2), .examine(ex2),
    .signature(sig2), .done(done2), .pass(pass2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; rve = 0; examine = 0; resp = 0; rve2 = 0; ex2 = 0; resp2 = 0;
    model_acc = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (done !== 1'b0) begin failures++; $display("done set after reset"); end
    for (int i = 0; i < 600; i++) begin
      rve     = $urandom % 2;
      resp    = M'($urandom);
      examine = ($urandom % 40) == 0;
      @(posedge clk);
      if (rve) model_acc = (model_acc + resp) % 1024;
      if (examine) begin
        model_sig = model_acc;
        model_acc = 0;
        #1;
        checks += 3;
        if (sig !== 10'(model_sig)) begin failures++; $display("sig %0d exp %0d", sig, model_sig); end
        if (done !== 1'b1) begin failures++; $display("done not set"); end
        if (pass !== (model_sig == 496)) begin failures++; $display("pass wrong"); end
      end else #1;
    end
    // order independence: a random permutation of the words 0..31
    for (int j = 0; j < 32; j++) order[j] = j;
    for (int j = 31; j > 0; j--) begin
      k = $urandom % (j + 1);
      tmp = order[j]; order[j] = order[k]; order[k] = tmp;
    end
    for (int j = 0; j < 32; j++) begin
      rve2 = 1; resp2 = M'(order[j]); ex2 = (j == 31);
      @(posedge clk); #1;
      // an idle cycle in between must not change anything
      rve2 = 0; ex2 = 0; resp2 = M'($urandom);
      @(posedge clk); #1;
    end
    checks += 2;
    if (sig2 !== 10'd496) begin failures++; $display("shuffled sig %0d", sig2); end
    if (pass2 !== 1'b1 || done2 !== 1'b1) begin failures++; $display("shuffled not pass"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
