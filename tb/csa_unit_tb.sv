// csa_unit_tb: compare-select-add unit with signature-based error detection.
// Streams one random operation per cycle and compares every result with a
// reference computed here (min by the sign of the modulo difference, ties to
// pm1). Checks the two-edge latency through out_valid, the error flag low on
// fault-free operations, and detection of injected faults: wrong input
// signature, flipped adder sum bits, flipped multiplexer select. The unit is
// built with a multi-bit (interleaved parity) signature of S bits.
module csa_unit_tb;
  localparam int unsigned W = vit_pkg::METRIC_W;
  // 1 when a sum_flip fault is seen whatever metric wins (csa), 0 when only
  // when the faulty adder's result is selected (pcsa)
  localparam bit SUM_ALWAYS_SEEN = 1'b1;
  localparam int unsigned S = 2;

  typedef struct {
    logic [W-1:0] o1, o2;
    logic         d;
    int           kind;    // 0 none, 1 parity, 2 sum flip, 3 select flip
    logic         exp_err;
    int           t_in;
  } exp_t;

  logic         clk = 1'b0, rst;
  logic         in_valid, out_valid, dec, err;
  logic [S-1:0] out1_p, out2_p;
  logic [W-1:0] pm1, pm2, bm_a, bm_b, out1, out2;
  logic [S-1:0] pm1_p, pm2_p, bm_a_p, bm_b_p;
  logic [W:0]   fi;
  exp_t         q[$];
  int checks = 0, failures = 0, cyc = 0;
  int n_detect[4];

  csa_unit #(.W(W), .S(S)) dut (
    .clk, .rst, .in_valid, .pm1, .pm1_p, .pm2, .pm2_p, .bm_a, .bm_a_p,
    .bm_b, .bm_b_p, .fi, .out_valid, .out1, .out1_p, .out2, .out2_p, .dec, .err
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [S-1:0] sig(logic [W-1:0] v);
    logic [S-1:0] r;
    r = '0;
    for (int i = 0; i < W; i++) r[i % S] = r[i % S] ^ v[i];
    return r;
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, msg);
    end
  endtask

  // result monitor
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      exp_t e;
      if (q.size() == 0) begin
        check(1'b0, "result without operation");
      end else begin
        e = q.pop_front();
        check(cyc - e.t_in == 2, $sformatf("latency is two cycles (got %0d)", cyc - e.t_in));
        if (e.kind == 0 || e.kind == 1) begin
          check(out1 == e.o1 && out2 == e.o2 && dec == e.d, "result values");
        end
        check(err == e.exp_err, $sformatf("error flag (fault kind %0d)", e.kind));
        if (e.kind != 0 && err) n_detect[e.kind]++;
      end
    end
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; fi = '0;
    {pm1, pm2, bm_a, bm_b} = '0;
    {pm1_p, pm2_p, bm_a_p, bm_b_p} = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      exp_t e;
      logic [W-1:0] d, mn;
      int r;
      @(negedge clk);
      in_valid = ($urandom % 8) != 0;
      pm1  = W'($urandom);
      pm2  = (i % 16 == 5) ? pm1 : pm1 + W'($urandom % 4096) - W'(2048);
      bm_a = W'($urandom % 64);
      bm_b = W'($urandom % 64);
      {pm1_p, pm2_p, bm_a_p, bm_b_p} = {sig(pm1), sig(pm2), sig(bm_a), sig(bm_b)};
      fi = '0;
      d  = pm1 - pm2;
      e.d  = !d[W-1] && d != 0;
      mn   = e.d ? pm2 : pm1;
      e.o1 = mn + bm_a;
      e.o2 = mn + bm_b;
      e.kind = 0;
      e.exp_err = 1'b0;
      r = $urandom % 10;
      if (r == 0) begin
        e.kind = 1;
        case ($urandom % 4)
          0: pm1_p  = pm1_p  ^ (S'(1) << ($urandom % S));
          1: pm2_p  = pm2_p  ^ (S'(1) << ($urandom % S));
          2: bm_a_p = bm_a_p ^ (S'(1) << ($urandom % S));
          default: bm_b_p = bm_b_p ^ (S'(1) << ($urandom % S));
        endcase
        e.exp_err = 1'b1;
      end else if (r == 1) begin
        e.kind = 2;
        fi[W:1] = W'(1) << ($urandom % W);
        e.exp_err = SUM_ALWAYS_SEEN ? 1'b1 : !e.d;
      end else if (r == 2) begin
        e.kind = 3;
        fi[0] = 1'b1;
        e.exp_err = (pm1 != pm2);
      end
      e.t_in = cyc;   // edge on which the operands are captured
      if (in_valid) q.push_back(e);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    #1;
    check(q.size() == 0, "all operations returned");
    for (int k = 1; k < 4; k++)
      check(n_detect[k] > 0, $sformatf("fault kind %0d detected at least once", k));
    $display("detections: parity %0d, sum %0d, select %0d", n_detect[1], n_detect[2], n_detect[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
