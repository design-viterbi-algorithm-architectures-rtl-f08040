// sig_gen_tb: interleaved-parity signature generator.
// For signature widths 1, 2 and 4 and random words, each signature bit must
// equal the XOR of the data bits in its group, computed here bit by bit. For
// random sums it also checks the prediction rule the datapath relies on:
// sig(x + y) = sig(x) ^ sig(y) ^ sig(carries), with the carries taken from a
// reference addition written here.
module sig_gen_tb;
  localparam int unsigned W = vit_pkg::METRIC_W;
  logic [W-1:0] d1, d2, d4;
  logic [0:0]   s1;
  logic [1:0]   s2;
  logic [3:0]   s4;
  int checks = 0, failures = 0;

  sig_gen #(.W(W), .S(1)) u1 (.d(d1), .sig(s1));
  sig_gen #(.W(W), .S(2)) u2 (.d(d2), .sig(s2));
  sig_gen #(.W(W), .S(4)) u4 (.d(d4), .sig(s4));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] ref_sig(logic [W-1:0] v, int s);
    logic [3:0] r;
    r = '0;
    for (int k = 0; k < s; k++)
      for (int i = k; i < W; i += s) r[k] = r[k] ^ v[i];
    return r;
  endfunction

  function automatic logic [W-1:0] ref_carries(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] c;
    logic cy;
    cy = 1'b0;
    for (int i = 0; i < W; i++) begin
      c[i] = cy;
      cy = (x[i] & y[i]) | (cy & (x[i] | y[i]));
    end
    return c;
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [W-1:0] x, y, c;
      logic [3:0] sx, sy, sc, ss;
      x = W'($urandom);
      y = W'($urandom);
      d1 = x; d2 = x; d4 = x;
      #1;
      check(s1 == ref_sig(x, 1)[0:0], "S=1 signature");
      check(s2 == ref_sig(x, 2)[1:0], "S=2 signature");
      check(s4 == ref_sig(x, 4), "S=4 signature");
      sx = s4;
      d4 = y; #1; sy = s4;
      c  = ref_carries(x, y);
      d4 = c; #1; sc = s4;
      d4 = x + y; #1; ss = s4;
      check(ss == (sx ^ sy ^ sc), "S=4 prediction through an adder");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
