// two_rail_checker_tb: exhaustive check of the two-pair two-rail checker.
// For all 16 input combinations: when both pairs are valid (complementary)
// the output must be the valid code ~(x0^y0) on z0 and its complement on z1;
// when either pair is invalid the output pair must be invalid (z0 == z1).
module two_rail_checker_tb;
  logic x0, x1, y0, y1, z0, z1;
  int checks = 0, failures = 0;

  two_rail_checker dut (.x0, .x1, .y0, .y1, .z0, .z1);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x0, x1, y0, y1} = 4'(v);
      #1;
      checks++;
      if ((x0 != x1) && (y0 != y1)) begin
        if (!(z0 == ~(x0 ^ y0) && z1 == ~z0)) begin
          failures++;
          $display("FAIL valid in %b%b %b%b -> %b%b", x0, x1, y0, y1, z0, z1);
        end
      end else if (z0 != z1) begin
        failures++;
        $display("FAIL invalid in %b%b %b%b not flagged -> %b%b", x0, x1, y0, y1, z0, z1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
