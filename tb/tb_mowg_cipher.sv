// tb_mowg_cipher -- checks the key-stream generator against the plain WG model.
// For several random sets of 11 load words: release reset, present word j
// whenever load_sel[j] is set during load_req, and compare every run-phase
// key-stream word with the reference (plain LFSR, plain WGperm, polynomial
// basis). Also checks that the first key-stream word comes exactly 33 clocks
// after the FSM becomes active and that ks_valid then stays high (4 keys x
// 200 run words).
module tb_mowg_cipher;
  import mowg_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, load_req, op0, op1, ks_valid;
  logic [10:0] load_sel;
  logic [28:0] init_vec;
  logic [16:0] key_strm;
  logic [28:0] w [11];
  logic [16:0] ref_ks [$];
  int checks = 0, failures = 0;

  mowg_cipher dut (.clk, .rst_n, .init_vec, .load_req, .load_sel, .op0, .op1, .key_strm, .ks_valid);

  always_comb begin
    init_vec = 29'h0;
    for (int j = 0; j < 11; j++) if (load_sel[j]) init_vec = w[j];
  end

  task automatic run_key(int n_run);
    int cyc, first;
    for (int j = 0; j < 11; j++) w[j] = 29'($urandom);
    wg_keystream(w, n_run, ref_ks);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);                        // FSM becomes active at this edge
    cyc = 0; first = -1;
    while (cyc < 33 + n_run) begin
      if (ks_valid && first < 0) first = cyc;
      if (cyc < 11) begin
        checks++;
        if (!load_req || load_sel !== (11'd1 << cyc)) begin
          failures++; $display("FAIL load handshake at %0d", cyc);
        end
      end
      if (cyc >= 33) begin
        checks += 2;
        if (!ks_valid) begin failures++; $display("FAIL ks_valid low at %0d", cyc); end
        if (key_strm !== ref_ks[cyc-33]) begin
          failures++;
          $display("FAIL run word %0d ks=%h expected %h", cyc - 33, key_strm, ref_ks[cyc-33]);
        end
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (first != 33) begin failures++; $display("FAIL first key stream at %0d, expected 33", first); end
  endtask

  initial begin
    rst_n = 0;
    for (int j = 0; j < 11; j++) w[j] = 0;
    for (int k = 0; k < 4; k++) run_key(200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
