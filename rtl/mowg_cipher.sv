// mowg_cipher -- MOWG(29,11,17) key-stream generator.
//
// The FSM sequences three phases; the LFSR (complemented state) shifts every
// clock once the FSM is active; the transform reads the LFSR word s[10]:
//   load (11 clocks) : init_vec, one 29-bit word per clock, enters the LFSR
//                      complemented. Word j is taken in the clock where
//                      load_sel[j] is set, word 0 first.
//   init (22 clocks) : the transform's 29-bit WGperm is XORed into the
//                      linear feedback.
//   run              : only the linear feedback; every clock key_strm carries
//                      17 fresh key-stream bits and ks_valid is high.
// The first key-stream word appears 33 clocks after the FSM becomes active
// (one clock after rst_n is released), then one word per clock.
//
// The composition follows the document's cipher architecture; the load-word
// handshake (load_req/load_sel) is this design's.
//
// Interface: clk; rst_n (synchronous, active low); init_vec; load_req and
// load_sel (which word to present); op0/op1 (phase); key_strm/ks_valid.
module mowg_cipher
  import mowg_pkg::*;
#(
  parameter gf_t             F     = F_POLY,
  parameter logic [L-1:0]    T     = TAPS,
  parameter longint unsigned G_EXP = GAMMA_EXP
) (
  input  logic         clk,
  input  logic         rst_n,
  input  gf_t          init_vec,
  output logic         load_req,
  output logic [L-1:0] load_sel,
  output logic         op0,
  output logic         op1,
  output logic [D-1:0] key_strm,
  output logic         ks_valid
);

  logic active;
  gf_t  x, wgperm;
  gf_t  state [L];
  logic [D-1:0] ks;

  mowg_fsm u_fsm (
    .clk, .rst_n, .op0, .op1, .active, .hot(load_sel)
  );

  mowg_lfsr #(.F(F), .T(T), .G_EXP(G_EXP)) u_lfsr (
    .clk, .en(active), .op({op1, op0}), .init_vec, .init_fb(wgperm),
    .x_out(x), .state
  );

  mowg_transform #(.F(F)) u_tf (.x, .wgperm, .key_strm(ks));

  assign load_req = active & ~op0 & ~op1;
  assign key_strm = ks;
  assign ks_valid = op1;

endmodule
