// tb_mont_mul_serial -- checks the bit-serial Montgomery multiplier.
// Each operation: start with random a, b, cin; done must come exactly
// 2*29+1 clocks after the start edge and c must equal (cin + a*b)*x^-29 mod f from the
// polynomial-basis reference. Also checks busy during the operation and
// that start is ignored while busy.
module tb_mont_mul_serial;
  import mowg_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, busy, done;
  logic [28:0] a, b, cin, c, xinv, exp_c;
  int checks = 0, failures = 0;

  mont_mul_serial dut (.clk, .rst_n, .start, .a, .b, .f(F_LOW), .cin, .busy, .done, .c);

  task automatic run_one(logic [28:0] ta, logic [28:0] tb_, logic [28:0] tc);
    int cyc;
    @(negedge clk);
    a = ta; b = tb_; cin = tc; start = 1;
    @(negedge clk);
    start = 0;
    a = 29'($urandom); b = 29'($urandom); cin = 29'($urandom);  // must not matter
    cyc = 1;
    while (!done) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low at cycle %0d", cyc); end
      if (cyc == 10) start = 1;            // start while busy is ignored
      if (cyc == 11) start = 0;
      @(negedge clk);
      cyc++;
      if (cyc > 200) break;
    end
    exp_c = rmul(tc ^ rmul(ta, tb_), xinv);
    checks += 2;
    if (cyc != 2 * 29 + 1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc, 2 * 29 + 1);
    end
    if (c !== exp_c) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%h c=%h exp=%h", ta, tb_, tc, c, exp_c);
    end
    @(negedge clk);
    checks++;
    if (c !== exp_c || busy) begin
      failures++;
      $display("FAIL result not held / busy after done");
    end
  endtask

  initial begin
    xinv = xpow(ORD - 29);
    rst_n = 0; start = 0; a = 0; b = 0; cin = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_one(29'h1, 29'h1, '0);
    run_one('1, '1, '0);
    run_one(29'h0123456, 29'h1fedcba, 29'h1555_5555);
    for (int i = 0; i < 40; i++)
      run_one(29'($urandom), 29'($urandom), (i % 2) ? 29'($urandom) : '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
