// enc_adder_tb: adder slice arrays for recomputation with encoded operands.
// One RESO instance (shift by 1) and one RERO instance (rotate by W/2). For
// random operands each instance adds and subtracts in both passes; the
// decoded result of each pass must equal the integer result modulo 2**W, and
// in pass 0 the RERO guard slot must hold the carry-out. A flipped slice must
// change the decoded results of the two passes differently.
module enc_adder_tb;
  import vit_pkg::*;
  localparam int unsigned W  = METRIC_W;
  localparam int unsigned KS = 1;
  localparam int unsigned KR = W / 2;
  localparam int unsigned ES = W + KS;
  localparam int unsigned ER = W + 1;

  logic [ES-1:0] sa, sb, ss, sflip;
  logic [ER-1:0] ra, rb, rs, rflip;
  logic          cin, pass;
  int checks = 0, failures = 0;

  enc_adder #(.ENC(ENC_RESO), .W(W), .K(KS)) u_reso (.a(sa), .b(sb), .cin, .pass, .flip(sflip), .s(ss));
  enc_adder #(.ENC(ENC_RERO), .W(W), .K(KR)) u_rero (.a(ra), .b(rb), .cin, .pass, .flip(rflip), .s(rs));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ES-1:0] enc_s(logic [W-1:0] x, logic p);
    return p ? {x, KS'(0)} : ES'(x);
  endfunction
  function automatic logic [ER-1:0] enc_r(logic [W-1:0] x, logic p);
    logic [2*ER-1:0] t;
    t = {ER'(0), 1'b0, x} << (p ? KR : 0);
    return t[ER-1:0] | t[2*ER-1:ER];
  endfunction
  function automatic logic [W-1:0] dec_s(logic [ES-1:0] y, logic p);
    return p ? y[ES-1:KS] : y[W-1:0];
  endfunction
  function automatic logic [ER-1:0] unrot_r(logic [ER-1:0] y, logic p);
    logic [2*ER-1:0] t;
    t = {y, y} >> (p ? KR : 0);
    return t[ER-1:0];
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    int det_s, det_r;
    det_s = 0; det_r = 0;
    sflip = '0; rflip = '0;
    for (int i = 0; i < 1500; i++) begin
      logic [W-1:0] x, y, yy, rr;
      logic         sub;
      logic [W:0]   full;
      logic [W-1:0] rs0, rs1, ss0, ss1;
      x   = W'($urandom);
      y   = W'($urandom);
      sub = 1'($urandom);
      yy  = sub ? ~y : y;
      cin = sub;
      rr  = sub ? x - y : x + y;
      full = {1'b0, x} + {1'b0, yy} + (W+1)'(cin);
      for (int p = 0; p < 2; p++) begin
        pass = 1'(p);
        sa = enc_s(x, pass); sb = enc_s(yy, pass);
        ra = enc_r(x, pass); rb = enc_r(yy, pass);
        #1;
        check(dec_s(ss, pass) == rr, $sformatf("RESO pass %0d %h %s %h", p, x, sub ? "-" : "+", y));
        check(unrot_r(rs, pass)[W-1:0] == rr, $sformatf("RERO pass %0d %h %s %h", p, x, sub ? "-" : "+", y));
        if (p == 0) check(rs[W] == full[W], "RERO guard slot holds carry-out");
      end
      // one faulty slice, present in both passes
      if (i % 4 == 0) begin
        int js, jr;
        js = $urandom % ES;
        jr = $urandom % ER;
        sflip = ES'(1) << js;
        rflip = ER'(1) << jr;
        pass = 1'b0; sa = enc_s(x, 0); sb = enc_s(yy, 0); ra = enc_r(x, 0); rb = enc_r(yy, 0);
        #1; ss0 = dec_s(ss, 0); rs0 = unrot_r(rs, 0)[W-1:0];
        pass = 1'b1; sa = enc_s(x, 1); sb = enc_s(yy, 1); ra = enc_r(x, 1); rb = enc_r(yy, 1);
        #1; ss1 = dec_s(ss, 1); rs1 = unrot_r(rs, 1)[W-1:0];
        check(ss0 != ss1, $sformatf("RESO slice %0d fault seen", js));
        check(rs0 != rs1, $sformatf("RERO slice %0d fault seen", jr));
        if (ss0 != ss1) det_s++;
        if (rs0 != rs1) det_r++;
        sflip = '0; rflip = '0;
      end
    end
    $display("slice faults detected: RESO %0d, RERO %0d", det_s, det_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
