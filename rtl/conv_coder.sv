// conv_coder: rate-1/2, constraint length 7 convolutional coder, 8-bit parallel.
//
// Each input byte is coded in one clock: its eight bits, MSB first, are run
// through the K = 7 code with generators 171 (X) and 133 (Y) octal, unrolled
// eight times, giving eight (X, Y) pairs. The six-bit state carries over from
// byte to byte. The 16 coded bits are handed to the modulator as two 8-bit
// words of four pairs each, {X0,Y0,X1,Y1,X2,Y2,X3,Y3} with pair 0 the oldest
// bit, the first word one cycle after the input strobe and the second
// HALF_GAP cycles after that.
//
// Interface: in_valid/in_data, one byte per strobe, strobes at least
// 2*HALF_GAP cycles apart; out_valid/out_data, registered.
//
// The code (133,171), the constraint length and the 8-bit parallel structure
// follow the transmitter description; the X -> I, Y -> Q pairing, the bit
// order and the split into two 8-bit words are this design's choices.
module conv_coder
  import tx_pkg::*;
#(
  parameter int unsigned HALF_GAP = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output logic [7:0] out_data
);

  logic [5:0]  state;      // state[5] = most recent input bit, state[0] oldest
  logic [15:0] coded;
  logic [5:0]  state_n;
  logic [7:0]  hold;       // second coded word, waiting
  logic [$clog2(HALF_GAP+1)-1:0] gap;
  logic        pend;

  always_comb begin
    logic [6:0] w;
    state_n = state;
    coded   = '0;
    for (int k = 7; k >= 0; k--) begin
      w = {in_data[k], state_n};        // w[6] = current bit, w[0] = oldest
      coded[2*k+1] = ^(w & CC_G1);
      coded[2*k]   = ^(w & CC_G2);
      state_n = {in_data[k], state_n[5:1]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      hold      <= '0;
      gap       <= '0;
      pend      <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        state     <= state_n;
        out_valid <= 1'b1;
        out_data  <= coded[15:8];
        hold      <= coded[7:0];
        pend      <= 1'b1;
        gap       <= '0;
      end else if (pend) begin
        if (gap == $bits(gap)'(HALF_GAP - 1)) begin
          out_valid <= 1'b1;
          out_data  <= hold;
          pend      <= 1'b0;
        end
        gap <= gap + 1'b1;
      end
    end
  end

endmodule
