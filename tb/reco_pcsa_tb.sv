// reco_pcsa_tb: compare-select-add with recomputation on encoded operands.
// Runs a RESO instance (shift 1) and a RERO instance (rotate W/2) side by
// side on the same random operations, offered on random cycles. Checks:
// results against a reference computed here, err low without a fault,
// err high for every operation with an injected slice fault in the
// pm1+bm_a adder whose sum is selected (pm1 wins), acceptance of
// at most one operation every two cycles (in_ready), and results that
// appear after the fourth clock edge counting the accepting edge as the first.
module reco_pcsa_tb;
  import vit_pkg::*;
  localparam int unsigned W  = METRIC_W;
  localparam int unsigned KS = 1;
  localparam int unsigned KR = W / 2;

  typedef struct {
    logic [W-1:0] o1, o2;
    logic         d, faulty;
    int           t_in;
  } exp_t;

  logic          clk = 1'b0, rst, in_valid;
  logic [W-1:0]  pm1, pm2, bm_a, bm_b;
  logic [W+KS-1:0] fi_s;
  logic [W:0]    fi_r;
  logic          rdy_s, rdy_r, v_s, v_r, d_s, d_r, e_s, e_r;
  logic [W-1:0]  o1_s, o2_s, o1_r, o2_r;
  exp_t          q_s[$], q_r[$];
  int checks = 0, failures = 0, cyc = 0, last_acc = -10, n_acc = 0, n_det_s = 0, n_det_r = 0, n_stall = 0;

  reco_pcsa #(.ENC(ENC_RESO), .W(W), .K(KS)) u_s (
    .clk, .rst, .in_valid, .in_ready(rdy_s), .pm1, .pm2, .bm_a, .bm_b, .fi(fi_s),
    .out_valid(v_s), .out1(o1_s), .out2(o2_s), .dec(d_s), .err(e_s));
  reco_pcsa #(.ENC(ENC_RERO), .W(W), .K(KR)) u_r (
    .clk, .rst, .in_valid, .in_ready(rdy_r), .pm1, .pm2, .bm_a, .bm_b, .fi(fi_r),
    .out_valid(v_r), .out1(o1_r), .out2(o2_r), .dec(d_r), .err(e_r));

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, msg);
    end
  endtask

  task automatic take(ref exp_t qq[$], input logic [W-1:0] o1, input logic [W-1:0] o2,
                      input logic d, input logic e, input string nm, ref int ndet);
    exp_t x;
    if (qq.size() == 0) begin
      check(1'b0, {nm, " result without operation"});
      return;
    end
    x = qq.pop_front();
    check(cyc - x.t_in == 4, $sformatf("%s latency (got %0d)", nm, cyc - x.t_in));
    check(e == x.faulty, $sformatf("%s error flag (fault %0b)", nm, x.faulty));
    if (!x.faulty) check(o1 == x.o1 && o2 == x.o2 && d == x.d, {nm, " result values"});
    if (x.faulty && e) ndet++;
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      if (in_valid && rdy_s) begin
        check(cyc - last_acc >= 2, "at most one operation per two cycles");
        last_acc <= cyc;
        n_acc++;
      end
      if (in_valid && !rdy_s) n_stall++;
      check(rdy_s == rdy_r, "both units ready together");
      if (v_s) take(q_s, o1_s, o2_s, d_s, e_s, "RESO", n_det_s);
      if (v_r) take(q_r, o1_r, o2_r, d_r, e_r, "RERO", n_det_r);
    end
    cyc <= cyc + 1;
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; fi_s = '0; fi_r = '0;
    {pm1, pm2, bm_a, bm_b} = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 600; i++) begin
      exp_t x;
      logic [W-1:0] df, mn;
      // hold each operation until it is accepted
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      pm1  = W'($urandom);
      pm2  = (i % 16 == 3) ? pm1 : pm1 + W'($urandom % 8192) - W'(4096);
      bm_a = W'($urandom % 256);
      bm_b = W'($urandom % 256);
      x.faulty = ($urandom % 5) == 0;
      fi_s = x.faulty ? (W+KS)'(1) << ($urandom % (W + KS)) : '0;
      fi_r = x.faulty ? (W+1)'(1)  << ($urandom % (W + 1))  : '0;
      df   = pm1 - pm2;
      x.d  = !df[W-1] && df != 0;
      mn   = x.d ? pm2 : pm1;
      x.o1 = mn + bm_a;
      x.o2 = mn + bm_b;
      // a fault in the pm1+bm_a adder matters only when its sum is selected
      x.faulty = x.faulty && !x.d;
      while (in_valid && !rdy_s) begin
        @(negedge clk);
      end
      x.t_in = cyc;
      if (in_valid) begin
        q_s.push_back(x);
        q_r.push_back(x);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (6) @(posedge clk);
    #1;
    check(q_s.size() == 0 && q_r.size() == 0, "all operations returned");
    check(n_stall > 0, "in_ready held an operation back");
    check(n_det_s > 0 && n_det_r > 0, "slice faults detected");
    $display("accepted %0d, held back %0d cycles, detected RESO %0d RERO %0d", n_acc, n_stall, n_det_s, n_det_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
