// mont_mul_serial -- bit-serial Montgomery multiplier over GF(2^M).
//
// Computes c = a * b * x^-M mod f(x) with a single multiplier element: one
// row of AND gates, one row of XOR gates and the C register. A control bit
// ctr alternates the element between the two halves of each loop pass:
//   ctr=0: the AND row sees B and a_i,       C <= Cin/C ^ a_i*B   (step 3)
//   ctr=1: the AND row sees F and C(0),      C <= (C ^ C(0)*F)/x  (steps 4,5)
// The "Cin or C" multiplexer feeds Cin into the XOR row on the very first
// step, so the unit computes (Cin + a*b) * x^-M; tie cin to 0 for a plain
// product. The division by x is a rewiring: bit M of the sum, which equals
// C(0), becomes the new MSB, so the x^M term of F is never stored.
//
// The element, its multiplexers and the C register follow the document's
// multiplier architecture; the start/done handshake and the bit counter i
// are this design's own choices.
//
// Timing: start is sampled while idle (busy=0); that clock loads a, b, f,
// cin. The unit then takes 2*M clocks (M bit counts, two steps each), so done
// is high in the cycle that follows the 2*M+1-th rising edge counted from the
// start edge, for one clock; the result stays on c until the next start.
// Reset (rst_n) is synchronous and active low.
module mont_mul_serial
  import mowg_pkg::*;
#(
  parameter int unsigned W = M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] f,
  input  logic [W-1:0] cin,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] c
);

  localparam int unsigned IW = $clog2(W + 1);

  logic [W-1:0]  a_q, b_q, f_q, cin_q, c_q;
  logic [IW-1:0] i_q;
  logic          ctr_q, first_q;

  // the multiplier element
  logic [W-1:0] and_op, and_out, xor_in, xor_out, c_next;
  logic         and_bit;

  always_comb begin
    and_op  = ctr_q ? f_q : b_q;                    // Mux B or F
    and_bit = ctr_q ? c_q[0] : a_q[0];              // Mux A(i) or C(0)
    and_out = and_op & {W{and_bit}};                // AND gates
    xor_in  = first_q ? cin_q : c_q;                // Mux Cin or C
    xor_out = xor_in ^ and_out;                     // XOR gates
    c_next  = ctr_q ? {c_q[0], xor_out[W-1:1]}      // shift by wiring
                    : xor_out;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      ctr_q   <= 1'b0;
      first_q <= 1'b0;
      i_q     <= '0;
      c_q     <= '0;
      a_q     <= '0;
      b_q     <= '0;
      f_q     <= '0;
      cin_q   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_q     <= a;
          b_q     <= b;
          f_q     <= f;
          cin_q   <= cin;
          ctr_q   <= 1'b0;
          first_q <= 1'b1;
          i_q     <= '0;
          busy    <= 1'b1;
        end
      end else begin
        c_q     <= c_next;
        first_q <= 1'b0;
        ctr_q   <= ~ctr_q;
        if (ctr_q) begin
          a_q <= a_q >> 1;                          // next A(i)
          i_q <= i_q + 1'b1;
          if (i_q == IW'(W - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assign c = c_q;

endmodule
