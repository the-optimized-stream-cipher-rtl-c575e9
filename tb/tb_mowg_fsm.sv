// tb_mowg_fsm -- checks the phase controller cycle by cycle.
// After rst_n is released: one clock inactive, then op1/op0 = 00 for 11
// clocks, 01 for 22 clocks, then 10 for good; the one-hot counter must be
// one-hot, advance by one position per clock in load/init, and stand still in
// the run phase. A second reset in the middle of the init phase must restart
// the sequence from the load phase.
module tb_mowg_fsm;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, op0, op1, active;
  logic [10:0] hot;
  int checks = 0, failures = 0;

  mowg_fsm dut (.clk, .rst_n, .op0, .op1, .active, .hot);

  // expected phase at active clock n (n = 0 is the first active clock)
  function automatic logic [1:0] exp_op(int n);
    if (n < 11) return 2'b00;
    if (n < 33) return 2'b01;
    return 2'b10;
  endfunction

  task automatic run_seq(int n_clocks);
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);                    // the 1-bit register sets here
    for (int n = 0; n < n_clocks; n++) begin
      checks += 3;
      if (!active) begin failures++; $display("FAIL active low at %0d", n); end
      if ({op1, op0} !== exp_op(n)) begin
        failures++;
        $display("FAIL clock %0d op=%b%b expected %b", n, op1, op0, exp_op(n));
      end
      if (hot !== (11'd1 << ((n < 33 ? n : 33) % 11))) begin
        failures++;
        $display("FAIL clock %0d hot=%b", n, hot);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (active || {op1, op0} != 2'b00) begin failures++; $display("FAIL reset state"); end
    if (hot !== 11'd1) begin failures++; $display("FAIL reset one-hot"); end
    run_seq(20);                       // reset again in the init phase
    rst_n = 0;
    repeat (2) @(negedge clk);
    run_seq(80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
