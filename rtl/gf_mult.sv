// gf_mult: bit-level pipelined parallel standard-basis GF(2^m) multiplier.
//
// Computes P = A*B in GF(2^m) as P = sum_j b_j (A alpha^j). The array has m
// rows of m basic cells (gf_mult_cell). Row j adds b_j * (A alpha^j) into the
// partial product and at the same time forms A alpha^(j+1) for the next row,
// using the fixed primitive polynomial, so every cell is one AND and one XOR
// deep. Pipeline registers close PIPE_STAGES groups of rows, spread evenly
// over the array. With the default PIPE_STAGES = M every row is registered:
// each cell then has three latches (its multiplicand bit, its partial product
// bit and the multiplier bit it passes on) and the path between registers is
// a single cell, one AND and one XOR. in_valid travels alongside.
//
// Interface: a, b, in_valid in; p, out_valid out, PIPE_STAGES clock cycles
// later (the last stage is the output register). With PIPE_STAGES = 0 the
// multiplier is purely combinational.
//
// The cell array, the use of the known polynomial coefficients, the
// bit-level pipelining with three latches per cell and the one-cell critical
// path follow the transmitter description; reading "three latches" as the
// three registered signals of each cell is this design's interpretation.
module gf_mult #(
  parameter int unsigned M           = 8,
  parameter logic [7:0]  POLY        = 8'h1D,  // f_0..f_{m-1}; f_m = 1 implied
  parameter int unsigned PIPE_STAGES = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         out_valid,
  output logic [M-1:0] p
);

  for (genvar j = 0; j < M; j++) begin : g_row
    // Inputs of this row, taken from the row above or from the ports.
    logic [M-1:0] a_i, p_i, b_i;
    logic         v_i;
    // Outputs of this row after the optional pipeline register.
    logic [M-1:0] a_o, p_o, b_o;
    logic         v_o;
    logic [M-1:0] a_n, p_n, v_c;

    if (j == 0) begin : g_first
      assign a_i = a;
      assign p_i = '0;
      assign b_i = b;
      assign v_i = in_valid;
    end else begin : g_next
      assign a_i = g_row[j-1].a_o;
      assign p_i = g_row[j-1].p_o;
      assign b_i = g_row[j-1].b_o;
      assign v_i = g_row[j-1].v_o;
    end

    for (genvar i = 0; i < M; i++) begin : g_cell
      gf_mult_cell #(.F_I(POLY[i])) u_cell (
        .a_in  (a_i[i]),
        .v_in  ((i == 0) ? 1'b0 : v_c[(i == 0) ? 0 : i-1]),
        .msb_in(a_i[M-1]),
        .b_in  (b_i[j]),
        .p_in  (p_i[i]),
        .a_out (a_n[i]),
        .v_out (v_c[i]),
        .p_out (p_n[i])
      );
    end

    // Register after this row when it closes one of the PIPE_STAGES groups.
    localparam bit REG = ((j + 1) * PIPE_STAGES) / M != (j * PIPE_STAGES) / M;

    if (REG) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          a_o <= '0;
          p_o <= '0;
          b_o <= '0;
          v_o <= 1'b0;
        end else begin
          a_o <= a_n;
          p_o <= p_n;
          b_o <= b_i;
          v_o <= v_i;
        end
      end
    end else begin : g_wire
      assign a_o = a_n;
      assign p_o = p_n;
      assign b_o = b_i;
      assign v_o = v_i;
    end
  end

  assign p         = g_row[M-1].p_o;
  assign out_valid = g_row[M-1].v_o;

endmodule
