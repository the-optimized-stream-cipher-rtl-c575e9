// mowg_top -- MOWG(29,11,17) stream-cipher encryptor/decryptor.
//
// A 128-bit key and a 128-bit IV form the 319-bit initial LFSR content
// {63'b0, key, iv}: load word j is bits [29j+28:29j], so word 0 is iv[28:0]
// and word 10 holds the 63 zero pad bits' share. The FSM's one-hot counter
// picks the word presented in each load clock. In the run phase the 17-bit
// key stream is XORed with the 17-bit input word every clock; the same
// module decrypts when fed cipher text.
//
// Beside the cipher sits the stand-alone bit-serial Montgomery multiplier
// (mul_* ports), the multiplier element the cipher's transform is built from,
// brought out on its own ports as a separately usable unit; it shares only
// the clock and reset with the cipher.
//
// Signal names follow the document's simulation (key, iv, plain, cipher,
// c0, c1, out17); the key/IV-to-LFSR mapping and the output register are
// this design's choices.
//
// Timing: release rst_n (synchronous, active low) with key and iv stable;
// they must stay stable for the following 12 clocks. The first run clock is
// the 34th after release; from then on plain is sampled every clock and the
// matching cipher appears on the next clock with valid high.
module mowg_top
  import mowg_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key,
  input  logic [127:0] iv,
  input  logic [D-1:0] plain,
  output logic [D-1:0] cipher,
  output logic         valid,
  output logic         c0,
  output logic         c1,
  output logic [D-1:0] out17,
  // stand-alone bit-serial Montgomery multiplier
  input  logic         mul_start,
  input  gf_t          mul_a,
  input  gf_t          mul_b,
  input  gf_t          mul_f,
  input  gf_t          mul_cin,
  output logic         mul_busy,
  output logic         mul_done,
  output gf_t          mul_c
);

  localparam int unsigned KV = M * L;   // 319 bits of LFSR state

  logic [KV-1:0] kv;
  logic [L-1:0]  sel;
  logic          load_req;
  gf_t           iv1;
  logic [D-1:0]  ks;
  logic          ks_valid;

  assign kv = {{(KV - 256){1'b0}}, key, iv};

  always_comb begin
    iv1 = '0;
    for (int j = 0; j < L; j++)
      if (sel[j]) iv1 |= kv[M*j +: M];
  end

  mowg_cipher u_cipher (
    .clk, .rst_n, .init_vec(iv1), .load_req, .load_sel(sel),
    .op0(c0), .op1(c1), .key_strm(ks), .ks_valid
  );

  assign out17 = ks;

  mont_mul_serial #(.W(M)) u_mul (
    .clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b), .f(mul_f),
    .cin(mul_cin), .busy(mul_busy), .done(mul_done), .c(mul_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cipher <= '0;
      valid  <= 1'b0;
    end else begin
      cipher <= ks_valid ? (plain ^ ks) : '0;
      valid  <= ks_valid;
    end
  end

endmodule
