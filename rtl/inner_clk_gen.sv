// inner_clk_gen: internal clock-rate generator of the transmitter.
//
// The transmitter uses four related rates: the 204 byte-slot clock divided by
// two, the 204 clock itself, and its double and quadruple. This design runs
// every block from one master clock at the fastest rate and turns the slower
// rates into one-cycle enable strobes, so the whole chip is a single clock
// domain. A free-running DIV_W-bit counter produces the strobes: en[k] is high
// in one cycle out of 2^k (en[0] every cycle, en[3] every eighth cycle).
//
// Interface: clk (master clock, the fastest rate), rst_n (asynchronous,
// active low); en[3:0] strobes, registered, first en[3] pulse in the eighth
// cycle after reset; phase, the counter value.
//
// The four rates come from the transmitter description; generating them as
// enables of one clock rather than as separate clocks is this design's choice.
module inner_clk_gen #(
  parameter int unsigned DIV_W = 3          // log2 of the slowest division
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [DIV_W:0]   en,              // en[k]: one cycle in 2^k
  output logic [DIV_W-1:0] phase
);

  logic [DIV_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  // Strobe k fires when the low k bits of the counter are all ones.
  always_comb begin
    logic [DIV_W-1:0] mask;
    mask  = '0;
    en[0] = 1'b1;
    for (int k = 1; k <= DIV_W; k++) begin
      mask[k-1] = 1'b1;
      en[k]     = (cnt & mask) == mask;
    end
  end

  assign phase = cnt;

endmodule
