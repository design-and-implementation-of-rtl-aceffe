// gf_mult_cell: basic cell M(i,j) of the standard-basis GF(2^m) multiplier.
//
// Row j of the multiplier array handles multiplier bit b_j; cell i of the row
// handles coordinate i. Each cell does two things at once:
//   * multiply the running multiplicand by alpha:
//       a_out = v_in ^ (msb_in & f_i)      (v_in = coordinate i-1 of A*alpha^j,
//                                           msb_in = coordinate m-1)
//   * accumulate the partial product:
//       p_out = p_in ^ (a_in & b_in)
// Because the primitive polynomial is fixed, f_i is a parameter: for
// F_I = 1 the alpha step is one XOR, for F_I = 0 it is a wire, so the cell's
// longest path is one AND and one XOR. v_out passes a_in on to cell i+1 of
// the next row; b and the msb line are broadcast along the row.
//
// The cell equations and its two variants (f_i = 1 and f_i = 0) follow the
// transmitter description; port names follow its cell drawing.
module gf_mult_cell #(
  parameter bit F_I = 1'b1
) (
  input  logic a_in,     // a_i^{j-1}: coordinate i of A*alpha^(j)
  input  logic v_in,     // coordinate i-1 of A*alpha^(j) (0 for i = 0)
  input  logic msb_in,   // coordinate m-1 of A*alpha^(j)
  input  logic b_in,     // multiplier bit b_j
  input  logic p_in,     // partial product coordinate i
  output logic a_out,    // coordinate i of A*alpha^(j+1)
  output logic v_out,    // a_in, to cell i+1
  output logic p_out     // partial product after this row
);

  if (F_I) begin : g_xor
    assign a_out = v_in ^ msb_in;
  end else begin : g_wire
    assign a_out = v_in;
  end

  assign v_out = a_in;
  assign p_out = p_in ^ (a_in & b_in);

endmodule
