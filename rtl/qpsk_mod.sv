// qpsk_mod: QPSK modulator with root-raised-cosine shaping and an IF of four
// times the symbol rate, built without multipliers.
//
// With the carrier at four times the symbol rate, cos(pi n/2) and
// sin(pi n/2) only take the values 1, 0, -1, 0 and 0, 1, 0, -1, so the IF
// signal S(n) = I(n) cos(pi n/2) + Q(n) sin(pi n/2) is, in turn, +I, +Q, -I,
// -Q of the filtered baseband channels. The four samples of one symbol
// period therefore need only four filter outputs: filtered I at offset 0,
// filtered Q at 1/4, filtered I at 1/2 and filtered Q at 3/4 of a symbol.
// As the symbols are +/-1, each of those is a lookup in a table addressed by
// the last SPAN I (or Q) symbols (srrc_rom). The minus signs cost nothing:
// negating every symbol negates the sum, so the -I and -Q samples read their
// tables at the bitwise inverted window.
//
// Data path: in_data carries four coded symbol pairs {I0,Q0,...,I3,Q3}; a
// 1-to-4 demultiplexer feeds them, one per clock, into the I and Q symbol
// windows, oldest pair first. Each clock with a new symbol produces one
// output word of four signed OUT_W-bit samples, out_sample[p] = S(4k+p),
// registered, so the samples of symbol k appear one cycle after it enters
// the window. A new in_data word may arrive in the cycle the last pair of
// the previous word is used. If a symbol is due and none is left the
// modulator outputs nothing and sets the sticky underflow flag.
//
// Interface: in_valid/in_data (8 bits), out_valid, out_sample[0:3].
// The ROM-based filter and mixer, the selection +I, +Q, -I, -Q, the 8-bit
// input with its 1-to-4 demultiplexer, roll-off 0.35 and the 10-bit output
// follow the transmitter description. The symbol mapping (0 -> +1), the
// window length, the address inversion for the negative samples and the
// two's complement output are this design's choices.
module qpsk_mod
  import tx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output tap_t       out_sample [4],
  output logic       underflow
);

  logic [7:0]      buf_q;      // the four pairs of the current word
  logic [2:0]      left;       // pairs not yet used
  logic [1:0]      sel;        // demultiplexer position
  logic            started;
  logic [SPAN-2:0] iwin, qwin; // bit 0 = newest symbol (the oldest falls out)

  wire        have = left != 3'd0;
  wire  [1:0] pair = buf_q[7 - 2*sel -: 2];            // {I, Q}
  wire  [SPAN-1:0] iwin_n = {iwin, pair[1]};
  wire  [SPAN-1:0] qwin_n = {qwin, pair[0]};

  tap_t rom_q [4];

  srrc_rom #(.PHASE(0)) u_rom0 (.addr( iwin_n), .data(rom_q[0]));   // +I(kT)
  srrc_rom #(.PHASE(1)) u_rom1 (.addr( qwin_n), .data(rom_q[1]));   // +Q(kT+T/4)
  srrc_rom #(.PHASE(2)) u_rom2 (.addr(~iwin_n), .data(rom_q[2]));   // -I(kT+T/2)
  srrc_rom #(.PHASE(3)) u_rom3 (.addr(~qwin_n), .data(rom_q[3]));   // -Q(kT+3T/4)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q     <= '0;
      left      <= '0;
      sel       <= '0;
      started   <= 1'b0;
      iwin      <= '0;
      qwin      <= '0;
      out_valid <= 1'b0;
      underflow <= 1'b0;
      for (int p = 0; p < 4; p++) out_sample[p] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (have) begin
        iwin      <= iwin_n[SPAN-2:0];
        qwin      <= qwin_n[SPAN-2:0];
        out_valid <= 1'b1;
        for (int p = 0; p < 4; p++) out_sample[p] <= rom_q[p];
        sel       <= sel + 1'b1;
        left      <= left - 1'b1;
      end else if (started && !in_valid) begin
        underflow <= 1'b1;
      end
      if (in_valid) begin
        buf_q   <= in_data;
        left    <= 3'd4;
        sel     <= '0;
        started <= 1'b1;
      end
    end
  end

endmodule
