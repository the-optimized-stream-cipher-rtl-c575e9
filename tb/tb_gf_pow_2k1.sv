// tb_gf_pow_2k1 -- checks X -> X^(2^10 - 1) against the polynomial-basis
// reference power, including 0, 1 and the generator x.
module tb_gf_pow_2k1;
  import mowg_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [28:0] x, y;
  int checks = 0, failures = 0;

  gf_pow_2k1 dut (.x, .y);

  task automatic check_one(logic [28:0] tx);
    logic [28:0] e;
    x = tx;
    #1;
    e = to_mont(rpow(from_mont(tx), 64'd1023));
    checks++;
    if (y !== e) begin failures++; $display("FAIL x=%h y=%h exp=%h", tx, y, e); end
  endtask

  initial begin
    check_one('0);
    check_one(to_mont(29'd1));
    check_one(to_mont(29'd2));
    for (int i = 0; i < 200; i++) check_one(29'($urandom));
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
