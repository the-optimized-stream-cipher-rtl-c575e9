// tb_mont_mul -- checks the combinational Montgomery multiplier.
// For random and corner operands, c must equal a*b*x^-29 mod f as computed
// by the polynomial-basis reference; also checks that Montgomery-domain
// products chain (MM(to_mont(a), to_mont(b)) = to_mont(a*b)).
module tb_mont_mul;
  import mowg_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [28:0] a, b, c, exp_c, xinv;
  int checks = 0, failures = 0;

  mont_mul dut (.a, .b, .f(F_LOW), .c);

  task automatic check_one(logic [28:0] ta, logic [28:0] tb_);
    a = ta; b = tb_;
    #1;
    exp_c = rmul(rmul(ta, tb_), xinv);
    checks++;
    if (c !== exp_c) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h exp=%h", ta, tb_, c, exp_c);
    end
  endtask

  initial begin
    xinv = xpow(ORD - 29);
    check_one('0, 29'h1abcdef);
    check_one(29'h1, 29'h1);
    check_one('1, '1);
    check_one(29'h1000_0000, 29'h1fff_ffff);
    for (int i = 0; i < 300; i++) check_one(29'($urandom), 29'($urandom));
    // domain chaining
    for (int i = 0; i < 50; i++) begin
      logic [28:0] x, y;
      x = 29'($urandom); y = 29'($urandom);
      a = to_mont(x); b = to_mont(y);
      #1;
      checks++;
      if (c !== to_mont(rmul(x, y))) begin
        failures++;
        $display("FAIL chain x=%h y=%h", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
