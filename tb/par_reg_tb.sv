// par_reg_tb: parity-signature register. Words written with their correct
// parity must read back unchanged with err low; a word written with a wrong
// signature must be flagged on the next cycle; ld low must hold the contents;
// reset must clear the register to a consistent state. A second instance
// with a 4-bit interleaved-parity signature must flag any single wrong
// signature bit.
module par_reg_tb;
  localparam int unsigned W = vit_pkg::METRIC_W;
  logic         clk = 1'b0, rst, ld, dp, qp, err;
  logic [W-1:0] d, q, held;
  int checks = 0, failures = 0;

  logic [3:0]   dp4, qp4;
  logic [W-1:0] q4;
  logic         err4;

  par_reg dut (.clk, .rst, .ld, .d, .dp, .q, .qp, .err);
  par_reg #(.W(W), .S(4)) dut4 (.clk, .rst, .ld, .d, .dp(dp4), .q(q4), .qp(qp4), .err(err4));

  function automatic logic [3:0] sig4(logic [W-1:0] v);
    logic [3:0] r;
    r = '0;
    for (int i = 0; i < W; i++) r[i % 4] = r[i % 4] ^ v[i];
    return r;
  endfunction

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    rst = 1'b1; ld = 1'b0; d = '0; dp = 1'b0; dp4 = '0;
    @(posedge clk); #1;
    check(q == '0 && qp == 1'b0 && err == 1'b0, "reset state");
    rst = 1'b0;
    for (int i = 0; i < 300; i++) begin
      logic [W-1:0] w;
      logic bad;
      w   = W'($urandom);
      bad = ($urandom % 4) == 0;
      d = w; ld = 1'b1;
      dp = (^w) ^ bad;
      dp4 = sig4(w) ^ (bad ? 4'(1) << ($urandom % 4) : 4'(0));
      @(posedge clk); #1;
      ld = 1'b0;
      check(q == w, "stored word");
      check(err == bad, bad ? "wrong signature not flagged" : "false error");
      check(q4 == w && err4 == bad, "4-bit signature register");
      held = q;
      d = ~w; dp = ~dp;
      @(posedge clk); #1;
      check(q == held, "hold with ld low");
    end
    rst = 1'b1;
    @(posedge clk); #1;
    check(q == '0 && err == 1'b0, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
