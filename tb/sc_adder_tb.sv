// sc_adder_tb: self-checking ripple-carry adder at its default width.
// Random and corner operands with both carry-in values: the sum and carry-out
// must equal the integer sum, the error flag must stay low, and the exported
// carries must predict the sum parity (par(s) = par(a)^par(b)^^carries).
module sc_adder_tb;
  localparam int unsigned N = vit_pkg::METRIC_W;
  logic [N-1:0] a, b, s, carries;
  logic         cin, cout, err;
  logic [N:0]   ref_sum;
  int checks = 0, failures = 0;

  sc_adder dut (.a, .b, .cin, .s, .cout, .carries, .err);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_one(input logic [N-1:0] ta, input logic [N-1:0] tb, input logic tc);
    a = ta; b = tb; cin = tc;
    #1;
    ref_sum = {1'b0, ta} + {1'b0, tb} + (N+1)'(tc);
    checks++;
    if ({cout, s} != ref_sum) begin
      failures++;
      $display("FAIL sum %h+%h+%b = %h exp %h", ta, tb, tc, {cout, s}, ref_sum);
    end
    checks++;
    if (err) begin
      failures++;
      $display("FAIL false error %h+%h+%b", ta, tb, tc);
    end
    checks++;
    if ((^s) != ((^ta) ^ (^tb) ^ (^carries))) begin
      failures++;
      $display("FAIL parity prediction %h+%h+%b", ta, tb, tc);
    end
  endtask

  initial begin
    try_one('0, '0, 1'b0);
    try_one('1, '0, 1'b1);
    try_one('1, '1, 1'b1);
    try_one({N{1'b1}}, N'(1), 1'b0);
    for (int i = 0; i < 2000; i++)
      try_one(N'($urandom), N'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
