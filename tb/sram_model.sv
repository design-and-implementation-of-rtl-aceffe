// sram_model: behavioural model of one external 32K x 8 static RAM
// (KM68B261A class) for simulation only; it is not part of the chip.
// A write happens at the clock edge that ends a cycle with ce_n and we_n low
// (the transmitter holds we_n low for exactly one clock, so this is the
// rising edge of we_n). Reads are asynchronous: rdata shows mem[addr]
// whenever ce_n and oe_n are low, and FFh (a floating bus) otherwise.
// The memory starts filled with zeros. writes counts write cycles.
module sram_model #(
  parameter int unsigned AW = 15
) (
  input  logic          clk,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);

  logic [7:0] mem [2**AW];
  int unsigned writes = 0;

  initial foreach (mem[i]) mem[i] = 8'h00;

  always @(posedge clk) begin
    if (!ce_n && !we_n) begin
      mem[addr] <= wdata;
      writes++;
    end
  end

  assign rdata = (!ce_n && !oe_n) ? mem[addr] : 8'hFF;

endmodule
