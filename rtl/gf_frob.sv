// gf_frob -- repeated squaring X -> X^(2^N) in GF(2^29), Montgomery domain.
//
// Squaring is linear over GF(2), so N successive squarings form a fixed
// 29x29 bit matrix. In a normal basis that matrix is a cyclic rotation (the
// ">>N" blocks of the MOWG transform); with the polynomial Montgomery domain
// used here it is a fixed XOR network. Column j of the matrix is the image
// of the unit vector e_j under N Montgomery squarings, computed at
// elaboration time; the hardware is only the XOR of the selected columns.
//
// Interface: x in, y = x^(2^N) out, both Montgomery-domain elements.
// Purely combinational. Parameters: N (number of squarings, 10 or 20 in the
// transform), F (field polynomial without its x^29 term).
module gf_frob
  import mowg_pkg::*;
#(
  parameter int unsigned N = 10,
  parameter gf_t         F = F_POLY
) (
  input  gf_t x,
  output gf_t y
);

  function automatic gf_t col(int unsigned j);
    return frob_col(j, N, F);
  endfunction

  for (genvar r = 0; r < M; r++) begin : g_row
    // row r of the matrix: the bits of x that feed output bit r
    localparam gf_t ROW = row_of(r);
    assign y[r] = ^(x & ROW);
  end

  function automatic gf_t row_of(int r);
    gf_t rw = '0;
    gf_t cj;
    for (int unsigned j = 0; j < M; j++) begin
      cj    = col(j);
      rw[j] = cj[r];
    end
    return rw;
  endfunction

endmodule
