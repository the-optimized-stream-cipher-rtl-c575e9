// mowg_fsm -- phase controller of the MOWG cipher.
//
// An 11-bit one-hot counter and a 2-bit binary counter. A 1-bit register
// delays the release of the active-low reset by one clock; until it is set
// the one-hot counter is held at (1,0,...,0). Afterwards the one-hot counter
// rotates every clock and the binary counter advances whenever the one-hot
// counter wraps from bit 10 to bit 0, i.e. every 11 clocks. The binary count
// decodes to the phase (op1 = bit0 AND bit1, op0 = bit0 XOR bit1):
//   count 0      op1 op0 = 0 0   load key/IV     11 clocks
//   count 1, 2   op1 op0 = 0 1   key init        22 clocks
//   count 3      op1 op0 = 1 0   run, until reset
// In the run phase both counters stop (their enable is NOT op1), matching
// the idle clocks of the document's controller.
//
// Structure, counter sizes and the op decoding follow the document's FSM
// figure and phase table; synchronous clock enables in place of gated
// clocks, and the extra outputs active (the delayed reset) and hot (the
// one-hot count, used to pick the load word), are this design's choices.
//
// Interface: clk, rst_n (synchronous, active low); op0, op1; active; hot.
module mowg_fsm
  import mowg_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  output logic         op0,
  output logic         op1,
  output logic         active,
  output logic [L-1:0] hot
);

  logic [1:0] cnt;
  logic       cnt_en;

  always_ff @(posedge clk) begin
    if (!rst_n) active <= 1'b0;
    else        active <= 1'b1;
  end

  assign cnt_en = active & ~op1;

  always_ff @(posedge clk) begin
    if (!(rst_n & active)) hot <= L'(1);
    else if (cnt_en)       hot <= {hot[L-2:0], hot[L-1]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                    cnt <= 2'b00;
    else if (cnt_en && hot[L-1])   cnt <= cnt + 2'b01;
  end

  assign op1 = cnt[0] & cnt[1];
  assign op0 = cnt[0] ^ cnt[1];

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(hot));

endmodule
