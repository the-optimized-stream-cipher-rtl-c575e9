// tb_gf_frob -- checks the squaring networks X -> X^(2^10) and X^(2^20).
// Reference: convert out of the Montgomery domain, raise to 2^N by
// square-and-multiply in the polynomial basis, convert back.
module tb_gf_frob;
  import mowg_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [28:0] x, y10, y20, y1;
  int checks = 0, failures = 0;

  gf_frob #(.N(10)) u10 (.x, .y(y10));
  gf_frob #(.N(20)) u20 (.x, .y(y20));
  gf_frob #(.N(1))  u1  (.x, .y(y1));

  task automatic check_one(logic [28:0] tx);
    logic [28:0] p;
    x = tx;
    #1;
    p = from_mont(tx);
    checks += 3;
    if (y10 !== to_mont(rpow(p, 64'd1 << 10))) begin failures++; $display("FAIL N=10 x=%h", tx); end
    if (y20 !== to_mont(rpow(p, 64'd1 << 20))) begin failures++; $display("FAIL N=20 x=%h", tx); end
    if (y1  !== to_mont(rmul(p, p)))            begin failures++; $display("FAIL N=1 x=%h", tx); end
  endtask

  initial begin
    check_one('0);
    check_one(to_mont(29'd1));
    check_one(to_mont(29'd2));
    for (int j = 0; j < 29; j++) check_one(29'd1 << j);
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
