// frac_rate_gen: 188/204 fractional rate generator.
//
// MPEG-2 packets of 188 bytes enter the transmitter and leave it as 204-byte
// Reed-Solomon code words in the same time, so the input byte rate is 188/204
// of the output byte rate. 188/204 reduces to 47/51, so a synchronous 6-bit
// counter that counts 204-rate byte slots modulo 51 and lets 47 of every 51
// slots through produces the input byte clock. Here the two clocks are
// enable strobes of one master clock.
//
// Interface: en_204 is the output byte-slot strobe; en_188 is a one-cycle
// strobe (combinational from en_204 and the counter) asserted in 47 of each
// 51 en_204 slots, namely slots 0..46 of the counter; slot holds the counter.
//
// The 6-bit counter follows the transmitter description; which 4 of the 51
// slots are skipped is this design's choice.
module frac_rate_gen #(
  parameter int unsigned NUM = 47,          // 188 / 4
  parameter int unsigned DEN = 51           // 204 / 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en_204,
  output logic       en_188,
  output logic [5:0] slot
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      slot <= '0;
    else if (en_204) slot <= (slot == 6'(DEN - 1)) ? '0 : slot + 1'b1;
  end

  assign en_188 = en_204 && (slot < 6'(NUM));

endmodule
