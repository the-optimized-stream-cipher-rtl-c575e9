// tb_mowg_top -- end-to-end test of the MOWG(29,11,17) encryptor/decryptor.
// An encrypting instance and a decrypting instance share a random 128-bit
// key and IV; the decryptor's reset is released one clock later and it is fed
// the encryptor's cipher text. Checks:
//   - every cipher word equals plain XOR the reference key stream;
//   - the decryptor returns the original plain text;
//   - c1/c0 pass load (00), key init (01) and run (10) for 11, 22 and n
//     clocks, and the first valid cipher word comes 34 clocks after the
//     FSM becomes active (33 clocks of load/init plus the output register);
//   - a re-key in the middle of the run phase (reset with a new key and IV)
//     restarts the sequence and produces the new key stream.
//   - the stand-alone serial multiplier, used while the cipher runs on, returns
//     (cin + a*b)*x^-29 mod f after 2*29+1 clocks.
// Each mechanism (load, init, run, re-key, decryption, multiplication) is counted and a
// mechanism that never occurred counts as a failure. The whole design runs at
// its default parameters.
module tb_mowg_top;
  import mowg_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic         rst_e;
  logic         rst_d = 1'b0;
  logic [127:0] key, iv;
  logic [16:0]  plain, cipher, plain_back, out17_e, out17_d;
  logic         valid_e, valid_d, c0_e, c1_e, c0_d, c1_d;
  logic [16:0]  ref_ks [$];
  logic [16:0]  sent [$];
  int checks = 0, failures = 0;
  int n_load = 0, n_init = 0, n_run = 0, n_rekey = 0, n_decrypt = 0;

  // stand-alone multiplier of the encrypting instance; the decryptor's is idle
  logic        mul_start, mul_busy, mul_done, mul_busy_d, mul_done_d;
  logic [28:0] mul_a, mul_b, mul_cin, mul_c, mul_c_d;
  int          n_mul = 0;

  mowg_top u_enc (.clk, .rst_n(rst_e), .key, .iv, .plain, .cipher,
                  .valid(valid_e), .c0(c0_e), .c1(c1_e), .out17(out17_e),
                  .mul_start, .mul_a, .mul_b, .mul_f(F_LOW), .mul_cin,
                  .mul_busy, .mul_done, .mul_c);
  mowg_top u_dec (.clk, .rst_n(rst_d), .key, .iv, .plain(cipher), .cipher(plain_back),
                  .valid(valid_d), .c0(c0_d), .c1(c1_d), .out17(out17_d),
                  .mul_start(1'b0), .mul_a('0), .mul_b('0), .mul_f(F_LOW), .mul_cin('0),
                  .mul_busy(mul_busy_d), .mul_done(mul_done_d), .mul_c(mul_c_d));

  always_ff @(posedge clk) rst_d <= rst_e;

  // multiplications run after the sessions, while the cipher stays in its run
  // phase; each result is checked
  // against (cin + a*b) * x^-29 and its 2*29+1 clock latency
  task automatic multiply(logic [28:0] ta, logic [28:0] tb_, logic [28:0] tc);
    int cyc;
    logic [28:0] e;
    @(negedge clk);
    mul_a = ta; mul_b = tb_; mul_cin = tc; mul_start = 1;
    @(negedge clk);
    mul_start = 0;
    cyc = 1;
    while (!mul_done && cyc < 200) begin @(negedge clk); cyc++; end
    e = rmul(tc ^ rmul(ta, tb_), xpow(ORD - 29));
    checks += 2;
    n_mul++;
    if (cyc != 2 * 29 + 1) begin failures++; $display("FAIL multiplier latency %0d", cyc); end
    if (mul_c !== e) begin failures++; $display("FAIL multiplier c=%h expected %h", mul_c, e); end
  endtask



  task automatic session(int n_words, bit cut_short);
    logic [28:0] w [11];
    logic [318:0] kv;
    int cyc, first, got;
    key = {$urandom, $urandom, $urandom, $urandom};
    iv  = {$urandom, $urandom, $urandom, $urandom};
    kv  = {63'd0, key, iv};
    for (int j = 0; j < 11; j++) w[j] = kv[29*j +: 29];
    wg_keystream(w, n_words + 2, ref_ks);
    sent.delete();
    rst_e = 0;
    repeat (3) @(negedge clk);
    rst_e = 1;
    @(negedge clk);                          // encryptor FSM active from here
    cyc = 0; first = -1; got = 0;
    while (cyc < 36 + n_words) begin
      // phase of the encryptor at active clock cyc
      checks++;
      if (cyc < 11) begin
        n_load++;
        if ({c1_e, c0_e} !== 2'b00) begin failures++; $display("FAIL phase load %0d", cyc); end
      end else if (cyc < 33) begin
        n_init++;
        if ({c1_e, c0_e} !== 2'b01) begin failures++; $display("FAIL phase init %0d", cyc); end
      end else begin
        n_run++;
        if ({c1_e, c0_e} !== 2'b10) begin failures++; $display("FAIL phase run %0d", cyc); end
      end
      // plain text presented during run clocks
      plain = 17'($urandom);
      if (cyc >= 33) sent.push_back(plain);
      if (valid_e && first < 0) first = cyc;
      if (valid_e) begin
        checks++;
        if (cipher !== (sent[cyc-34] ^ ref_ks[cyc-34])) begin
          failures++;
          $display("FAIL cipher word %0d = %h expected %h", cyc - 34, cipher, sent[cyc-34] ^ ref_ks[cyc-34]);
        end
      end
      if (valid_d) begin
        checks++;
        n_decrypt++;
        if (plain_back !== sent[got]) begin
          failures++;
          $display("FAIL decrypted word %0d = %h expected %h", got, plain_back, sent[got]);
        end
        got++;
      end
      @(negedge clk);
      cyc++;
      if (cut_short && cyc == 40) break;
    end
    if (cut_short) n_rekey++;
    checks++;
    if (first != 34) begin failures++; $display("FAIL first cipher at %0d, expected 34", first); end
  endtask

  initial begin
    rst_e = 0; plain = 0; key = 0; iv = 0;
    mul_start = 0; mul_a = 0; mul_b = 0; mul_cin = 0;
    session(30, 1'b0);
    session(20, 1'b1);       // re-key in the middle of the run phase
    session(60, 1'b0);
    for (int i = 0; i < 8; i++)
      multiply(29'($urandom), 29'($urandom), (i % 2) ? 29'($urandom) : '0);
    checks += 6;
    if (n_mul == 0)     begin failures++; $display("FAIL multiplier never used"); end
    if (n_load == 0)    begin failures++; $display("FAIL load phase never seen"); end
    if (n_init == 0)    begin failures++; $display("FAIL init phase never seen"); end
    if (n_run == 0)     begin failures++; $display("FAIL run phase never seen"); end
    if (n_rekey == 0)   begin failures++; $display("FAIL re-key never done"); end
    if (n_decrypt == 0) begin failures++; $display("FAIL nothing decrypted"); end
    $display("mechanisms: load=%0d init=%0d run=%0d rekey=%0d decrypted=%0d multiplications=%0d",
             n_load, n_init, n_run, n_rekey, n_decrypt, n_mul);
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
