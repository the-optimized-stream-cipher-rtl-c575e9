// tb_mowg_lfsr -- checks the complemented-state LFSR against a plain WG LFSR.
// The reference keeps the uncomplemented state A in the polynomial basis and
// runs A(t+11) = A(t+10)+A(t+9)+A(t+6)+A(t+3)+A(t+1)+gamma*A(t) (+ the
// feedback word during init). After every clock each stage of the design must
// hold to_mont(A) + 1. Runs 11 load, 22 init (random feedback words) and 40
// run clocks, with idle clocks (en=0) mixed in, which must hold the state.
module tb_mowg_lfsr;
  import mowg_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        en;
  logic [1:0]  op;
  logic [28:0] init_vec, init_fb, x_out;
  logic [28:0] state [11];
  logic [28:0] ra [11];
  logic [28:0] one_m;
  int checks = 0, failures = 0;
  int nshift = 0;                    // stages j >= 11-nshift have been written

  mowg_lfsr dut (.clk, .en, .op, .init_vec, .init_fb, .x_out, .state);

  task automatic step(logic [1:0] top, logic ten);
    logic [28:0] nw;
    @(negedge clk);
    op = top; en = ten;
    init_vec = 29'($urandom);
    init_fb  = 29'($urandom);
    case (top)
      2'b00:   nw = from_mont(init_vec);
      2'b01:   nw = lin_fb(ra) ^ from_mont(init_fb);
      default: nw = lin_fb(ra);
    endcase
    @(posedge clk);
    if (ten) begin
      for (int j = 0; j < 10; j++) ra[j] = ra[j+1];
      ra[10] = nw;
      nshift++;
    end
    #1;
    for (int j = 11 - (nshift < 11 ? nshift : 11); j < 11; j++) begin
      checks++;
      if (state[j] !== (to_mont(ra[j]) ^ one_m)) begin
        failures++;
        $display("FAIL op=%b stage %0d = %h expected %h", top, j, state[j], to_mont(ra[j]) ^ one_m);
      end
    end
    checks++;
    if (x_out !== state[10]) begin failures++; $display("FAIL x_out"); end
  endtask

  initial begin
    one_m = to_mont(29'd1);
    en = 0; op = 0; init_vec = 0; init_fb = 0;
    for (int j = 0; j < 11; j++) ra[j] = 0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 11; i++) step(2'b00, 1'b1);
    for (int i = 0; i < 22; i++) step(2'b01, (i % 7) != 3);
    for (int i = 0; i < 40; i++) step(2'b10, (i % 9) != 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
