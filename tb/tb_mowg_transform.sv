// tb_mowg_transform -- checks the MOWG transform.
// The input is the complemented LFSR word B = A + 1 (Montgomery domain); the
// output must be WGperm(A) = q(A+1) + 1 with q(y) = y + y^r1 + y^r2 + y^r3
// + y^r4, computed by the reference with separate exponentiations, and the
// key stream must be its low 17 bits.
module tb_mowg_transform;
  import mowg_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [28:0] x, wgperm, e;
  logic [16:0] ks;
  int checks = 0, failures = 0;

  mowg_transform dut (.x, .wgperm, .key_strm(ks));

  task automatic check_one(logic [28:0] tx);
    logic [28:0] a;
    x = tx;
    #1;
    a = from_mont(tx) ^ 29'd1;            // uncomplemented word A
    e = to_mont(mowg_ref_pkg::wgperm(a));
    checks += 2;
    if (wgperm !== e) begin failures++; $display("FAIL x=%h wgperm=%h exp=%h", tx, wgperm, e); end
    if (ks !== e[16:0]) begin failures++; $display("FAIL key stream x=%h", tx); end
  endtask

  initial begin
    check_one('0);
    check_one(to_mont(29'd1));
    for (int i = 0; i < 150; i++) check_one(29'($urandom));
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
