// mowg_lfsr -- 11-stage word LFSR over GF(2^29) holding the complemented state.
//
// The register holds B(t) = A(t) + 1, the complement of the state of the
// plain WG LFSR, which lets the transform drop its input inverter. Stage
// s[0] is B(t) (the oldest word, the one multiplied by gamma) and s[10] is
// B(t+10), the word sent to the transform. Each enabled clock the register
// shifts towards s[0] and s[10] takes the multiplexer output:
//   op1 op0 = 0 0  load : init_vec + 1        (the input inverter)
//   op1 op0 = 0 1  init : lin + init_fb       (linear + WGperm feedback)
//   op1 op0 = 1 0  run  : lin
// The plain recurrence A(t+11) = sum_taps A(t+j) + gamma*A(t) (+ WGperm)
// rewritten for B gives lin = sum_taps B(t+j) + gamma*B(t) + C with the
// constant C = gamma + (n_taps + 1)*1; for an even tap count this is
// gamma + 1 as in the document's figure, for the five taps used here it is
// gamma. gamma*B(t) is one Montgomery multiplier with a constant operand.
//
// The input multiplexer, the input inverter and the complemented state follow
// the document; the tap set, gamma and the constant C are derived for the
// chosen WG(29,11) polynomial. No reset: the state is fully written by the
// 11 load cycles.
//
// Interface: en shifts; op selects the input as above; init_vec is the load
// word; init_fb is the transform's 29-bit output; x_out = s[10]; state
// exposes all stages (s[0] in the low word).
module mowg_lfsr
  import mowg_pkg::*;
#(
  parameter gf_t              F     = F_POLY,
  parameter logic [L-1:0]     T     = TAPS,
  parameter longint unsigned  G_EXP = GAMMA_EXP
) (
  input  logic       clk,
  input  logic       en,
  input  logic [1:0] op,            // {op1, op0}
  input  gf_t        init_vec,
  input  gf_t        init_fb,
  output gf_t        x_out,
  output gf_t        state [L]
);

  localparam gf_t ONE   = mont_one(F);
  localparam gf_t GAMMA = mont_xpow(G_EXP, F);
  localparam gf_t CONST = GAMMA ^ (($countones(T) % 2 == 0) ? ONE : '0);

  gf_t s [L];
  gf_t g_s0, lin, s_in;

  mont_mul #(.W(M)) u_gamma (.a(s[0]), .b(GAMMA), .f(F), .c(g_s0));

  always_comb begin
    lin = g_s0 ^ CONST;
    for (int j = 1; j < L; j++)
      if (T[j]) lin ^= s[j];
    unique case (op)
      PH_LOAD: s_in = init_vec ^ ONE;
      PH_INIT: s_in = lin ^ init_fb;
      default: s_in = lin;
    endcase
  end

  always_ff @(posedge clk) begin
    if (en) begin
      for (int j = 0; j < L - 1; j++) s[j] <= s[j+1];
      s[L-1] <= s_in;
    end
  end

  assign x_out = s[L-1];
  assign state = s;

endmodule
