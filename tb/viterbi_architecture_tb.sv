// viterbi_architecture_tb: end-to-end test of the protected compare-select-add
// datapath at its default parameters (16-bit metrics, RESO shift 1, RERO
// rotate 8).
// Random metric operations are offered on random cycles and held until
// in_ready accepts them. Every unit's result is compared with a reference
// computed here; the error flags must be low on fault-free operations and
// high whenever an injected fault can change that unit's result. Counted
// mechanisms, each of which must occur at least once: pm1 wins, pm2 wins,
// tie, modulo wrap in the comparison, operation held back by in_ready, and
// detection of each fault kind (input signature, CSA sum, CSA select, PCSA
// sum, PCSA select, and an adder slice in each of the four recomputing
// units).
module viterbi_architecture_tb;
  import vit_pkg::*;
  localparam int unsigned W = METRIC_W;

  typedef struct {
    logic [W-1:0] o1, o2;
    logic         d;
    logic         e_csa, e_pcsa, e_reso, e_rero;  // expected error flags
    logic         e_preso, e_prero;
    logic         clean_csa, clean_pcsa;          // results must be exact
    int           t_in;
  } exp_t;

  typedef enum int {
    M_PM1, M_PM2, M_TIE, M_WRAP, M_STALL, M_PAR, M_CSA_SUM, M_CSA_SEL,
    M_PCSA_SUM, M_PCSA_SEL, M_RESO, M_RERO, M_PRESO, M_PRERO, M_NUM
  } mech_e;
  string mech_name[M_NUM] = '{"pm1 wins", "pm2 wins", "tie", "modulo wrap",
    "held by in_ready", "input signature", "CSA sum", "CSA select",
    "PCSA sum", "PCSA select", "RESO slice", "RERO slice", "PCSA RESO slice",
    "PCSA RERO slice"};
  int mech[M_NUM];

  logic clk = 1'b0, rst, in_valid, in_ready;
  logic [W-1:0] pm1, pm2, bm_a, bm_b;
  logic [3:0]   par_flip;
  logic [W:0]   csa_fi, pcsa_fi, rero_fi;
  logic [W:0]   reso_fi, preso_fi, prero_fi;
  logic csa_valid, csa_dec, csa_err, pcsa_valid, pcsa_dec, pcsa_err;
  logic reso_valid, reso_dec, reso_err, rero_valid, rero_dec, rero_err, err_any;
  logic preso_valid, preso_dec, preso_err, prero_valid, prero_dec, prero_err;
  logic [W-1:0] preso_out1, preso_out2, prero_out1, prero_out2;
  logic [W-1:0] csa_out1, csa_out2, pcsa_out1, pcsa_out2;
  logic [W-1:0] reso_out1, reso_out2, rero_out1, rero_out2;

  exp_t q_csa[$], q_pcsa[$], q_reso[$], q_rero[$], q_preso[$], q_prero[$];
  int checks = 0, failures = 0, cyc = 0, n_ops = 0;

  viterbi_architecture dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // one result of one unit against its expectation
  task automatic take(ref exp_t qq[$], input int lat, input logic [W-1:0] o1,
                      input logic [W-1:0] o2, input logic d, input logic e,
                      input logic e_exp, input logic clean, input string nm,
                      input mech_e m);
    exp_t x;
    if (qq.size() == 0) begin
      check(1'b0, {nm, " result without operation"});
      return;
    end
    x = qq.pop_front();
    check(cyc - x.t_in == lat, $sformatf("%s latency (got %0d)", nm, cyc - x.t_in));
    check(e == e_exp, $sformatf("%s error flag, expected %0b", nm, e_exp));
    if (clean) check(o1 == x.o1 && o2 == x.o2 && d == x.d, {nm, " result values"});
    if (e_exp && e && m != M_NUM) mech[m]++;
  endtask

  exp_t hd;
  always @(posedge clk) begin
    if (!rst) begin
      if (in_valid && !in_ready) mech[M_STALL]++;
      if (csa_valid) begin
        hd = q_csa[0];
        take(q_csa, 2, csa_out1, csa_out2, csa_dec, csa_err, hd.e_csa, hd.clean_csa, "CSA", M_NUM);
      end
      if (pcsa_valid) begin
        hd = q_pcsa[0];
        take(q_pcsa, 2, pcsa_out1, pcsa_out2, pcsa_dec, pcsa_err, hd.e_pcsa, hd.clean_pcsa, "PCSA", M_NUM);
      end
      if (reso_valid) begin
        hd = q_reso[0];
        take(q_reso, 4, reso_out1, reso_out2, reso_dec, reso_err, hd.e_reso, !hd.e_reso, "RESO", M_RESO);
      end
      if (rero_valid) begin
        hd = q_rero[0];
        take(q_rero, 4, rero_out1, rero_out2, rero_dec, rero_err, hd.e_rero, !hd.e_rero, "RERO", M_RERO);
      end
      if (preso_valid) begin
        hd = q_preso[0];
        take(q_preso, 4, preso_out1, preso_out2, preso_dec, preso_err, hd.e_preso, !hd.e_preso, "PCSA RESO", M_PRESO);
      end
      if (prero_valid) begin
        hd = q_prero[0];
        take(q_prero, 4, prero_out1, prero_out2, prero_dec, prero_err, hd.e_prero, !hd.e_prero, "PCSA RERO", M_PRERO);
      end
      check(err_any == ((csa_valid & csa_err) | (pcsa_valid & pcsa_err) |
                        (reso_valid & reso_err) | (rero_valid & rero_err) |
                        (preso_valid & preso_err) | (prero_valid & prero_err)), "err_any");
    end
    cyc <= cyc + 1;
  end

  // CSA/PCSA detections are counted by fault kind here
  int k_csa[$], k_pcsa[$];
  always @(posedge clk) begin
    if (!rst && csa_valid && k_csa.size() > 0) begin
      int k;
      k = k_csa.pop_front();
      if (csa_err && k >= 0) mech[k]++;
    end
    if (!rst && pcsa_valid && k_pcsa.size() > 0) begin
      int k;
      k = k_pcsa.pop_front();
      if (pcsa_err && k >= 0) mech[k]++;
    end
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0;
    par_flip = '0; csa_fi = '0; pcsa_fi = '0; reso_fi = '0; rero_fi = '0;
    preso_fi = '0; prero_fi = '0;
    {pm1, pm2, bm_a, bm_b} = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      exp_t x;
      logic [W-1:0] df, mn;
      int r, kc, kp;
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      case (i % 8)
        0: begin pm1 = W'($urandom); pm2 = pm1; end
        1: begin pm1 = W'(16'hFFF0 + ($urandom % 16)); pm2 = W'($urandom % 64); end
        default: begin pm1 = W'($urandom); pm2 = pm1 + W'($urandom % 2048) - W'(1024); end
      endcase
      bm_a = W'($urandom % 32);
      bm_b = W'($urandom % 32);
      par_flip = '0; csa_fi = '0; pcsa_fi = '0; reso_fi = '0; rero_fi = '0;
      preso_fi = '0; prero_fi = '0;
      df   = pm1 - pm2;
      x.d  = !df[W-1] && df != 0;
      mn   = x.d ? pm2 : pm1;
      x.o1 = mn + bm_a;
      x.o2 = mn + bm_b;
      {x.e_csa, x.e_pcsa, x.e_reso, x.e_rero, x.e_preso, x.e_prero} = '0;
      x.clean_csa = 1'b1; x.clean_pcsa = 1'b1;
      kc = -1; kp = -1;
      r = $urandom % 14;
      case (r)
        0: begin par_flip = 4'(1) << ($urandom % 4); x.e_csa = 1; x.e_pcsa = 1; kc = M_PAR; end
        1: begin csa_fi[W:1] = W'(1) << ($urandom % W); x.e_csa = 1; x.clean_csa = 0; kc = M_CSA_SUM; end
        2: begin csa_fi[0] = 1'b1; x.e_csa = (pm1 != pm2); x.clean_csa = 0; kc = M_CSA_SEL; end
        3: begin pcsa_fi[W:1] = W'(1) << ($urandom % W); x.e_pcsa = !x.d; x.clean_pcsa = 0; kp = M_PCSA_SUM; end
        4: begin pcsa_fi[0] = 1'b1; x.e_pcsa = (pm1 != pm2); x.clean_pcsa = 0; kp = M_PCSA_SEL; end
        5: begin reso_fi = (W+1)'(1) << ($urandom % (W + 1)); x.e_reso = 1; end
        6: begin rero_fi = (W+1)'(1) << ($urandom % (W + 1)); x.e_rero = 1; end
        7: begin preso_fi = (W+1)'(1) << ($urandom % (W + 1)); x.e_preso = !x.d; end
        8: begin prero_fi = (W+1)'(1) << ($urandom % (W + 1)); x.e_prero = !x.d; end
        default: ;
      endcase
      while (in_valid && !in_ready) @(negedge clk);
      x.t_in = cyc;
      if (in_valid) begin
        n_ops++;
        if (df == 0) mech[M_TIE]++;
        else if (x.d) mech[M_PM2]++;
        else mech[M_PM1]++;
        if ((pm1 > pm2) != x.d) mech[M_WRAP]++;
        q_csa.push_back(x); q_pcsa.push_back(x); q_reso.push_back(x); q_rero.push_back(x);
        q_preso.push_back(x); q_prero.push_back(x);
        k_csa.push_back(kc); k_pcsa.push_back(kp);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (8) @(posedge clk);
    #1;
    check(q_csa.size() == 0 && q_pcsa.size() == 0 && q_reso.size() == 0 && q_rero.size() == 0 &&
          q_preso.size() == 0 && q_prero.size() == 0,
          "every unit returned every operation");
    $display("operations: %0d", n_ops);
    for (int m = 0; m < M_NUM; m++) begin
      $display("  %-18s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, {"mechanism seen: ", mech_name[m]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
