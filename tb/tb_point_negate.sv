// tb_point_negate - self-checking test of point negation: -(x,y) = (x, x+y).
// Besides the formula, checks that the negated curve point is on the curve
// and that P + (-P) gives the point at infinity in the reference model.
module tb_point_negate;
  import tb_ecc_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [162:0] x1, y1, x3, y3;
  point_negate dut (.x1, .y1, .x3, .y3);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t p, n;
    for (int i = 0; i < 6; i++) begin
      p = tmul(rand_fe(163), gen163(), 163);
      x1 = 163'(p.x); y1 = 163'(p.y);
      #1;
      n.x = fe_t'(x3); n.y = fe_t'(y3);
      checks++;
      if (n != pneg(p)) begin failures++; $display("FAIL formula"); end
      checks++;
      if (!on_curve(n, 163)) begin failures++; $display("FAIL not on curve"); end
      checks++;
      if (padd(p, n, 163) != '0) begin failures++; $display("FAIL P + (-P) != O"); end
    end
    for (int i = 0; i < 100; i++) begin
      x1 = 163'(rand_fe(163)); y1 = 163'(rand_fe(163));
      #1;
      checks++;
      if (x3 != x1 || y3 != (x1 ^ y1)) begin failures++; $display("FAIL random"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
