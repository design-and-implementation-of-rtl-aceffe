// sram_converter: ping-pong packet buffer in two external SRAMs.
//
// Packets arrive at the 188 rate (47 bytes in every 51 byte slots) but the
// Reed-Solomon coder must see each packet as 188 consecutive message slots
// followed by 16 slots in which it emits parity. The converter therefore
// writes each incoming packet into one of two external SRAM chips while it
// reads the previous packet out of the other chip, swapping the chips' roles
// at every packet. Because the 188 input bytes and the 204 output slots of a
// packet take the same time, one packet of buffering per chip is enough.
//
// Write side: in_valid/in_data/in_sop from the randomizer. A packet is only
// written when it starts with in_sop and its target chip is free; otherwise
// it is dropped and the sticky overflow flag is set. After byte 187 the chip
// is marked full and the other chip becomes the write target.
// Read side: at each slot_en strobe (204 rate) the reader either issues a
// read of the next byte (slots 0..187) or a parity slot (188..203). Read data
// is captured one cycle after the address is driven, and out_valid pulses two
// cycles after slot_en, with out_sop on slot 0. After slot 187 the chip is
// released. With no full chip the reader stays idle and emits nothing.
// SRAM port per chip b: sram_ce_n, sram_oe_n, sram_we_n, sram_addr,
// sram_wdata, sram_rdata (the data bus is split into two directions; the
// chip's bidirectional pins are joined outside). All controls are registered;
// a write is a one-cycle low pulse of sram_we_n.
//
// The alternating use of two external SRAMs follows the transmitter
// description; the slot timing, the split data bus and the overflow rule are
// this design's choices.
module sram_converter
  import tx_pkg::*;
#(
  parameter int unsigned AW = 15            // 32K x 8 SRAM
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             slot_en,
  input  logic             in_valid,
  input  logic             in_sop,
  input  logic [7:0]       in_data,
  output logic [1:0]       sram_ce_n,
  output logic [1:0]       sram_oe_n,
  output logic [1:0]       sram_we_n,
  output logic [1:0][AW-1:0] sram_addr,
  output logic [1:0][7:0]  sram_wdata,
  input  logic [1:0][7:0]  sram_rdata,
  output logic             out_valid,
  output logic             out_sop,
  output logic [7:0]       out_data,
  output logic             overflow
);

  // write side
  logic       wb;          // chip being written
  logic       wact;        // a packet is being written
  logic [7:0] wcnt;
  // read side
  logic       rb;          // chip being read
  logic       ract;        // a code word is being read out
  logic [7:0] rslot;       // next slot 0..203
  logic [1:0] full;
  // read pipeline
  logic       rd_issued, rd_sop, rd_par, rd_last, rd_bank;

  wire wr_start = in_valid && in_sop && !full[wb];
  wire do_write = in_valid && (wact || wr_start);
  wire rd_go    = slot_en && (ract || full[rb]);
  wire [7:0] rs = ract ? rslot : 8'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb <= 1'b0; wact <= 1'b0; wcnt <= '0;
      rb <= 1'b0; ract <= 1'b0; rslot <= '0;
      full <= '0; overflow <= 1'b0;
      rd_issued <= 1'b0; rd_sop <= 1'b0; rd_par <= 1'b0; rd_last <= 1'b0; rd_bank <= 1'b0;
      sram_ce_n <= '1; sram_oe_n <= '1; sram_we_n <= '1;
      sram_addr <= '0; sram_wdata <= '0;
      out_valid <= 1'b0; out_sop <= 1'b0; out_data <= '0;
    end else begin
      sram_ce_n <= '1;
      sram_oe_n <= '1;
      sram_we_n <= '1;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;

      // ---------------- write side ----------------
      if (in_valid && in_sop && !wact && full[wb]) overflow <= 1'b1;
      if (in_valid && in_sop && wact) begin
        // a new sync byte before the packet was complete: restart it
        wcnt <= '0;
      end
      if (do_write) begin
        sram_ce_n[wb]  <= 1'b0;
        sram_we_n[wb]  <= 1'b0;
        sram_addr[wb]  <= AW'(in_sop ? 8'd0 : wcnt);
        sram_wdata[wb] <= in_data;
        if (!in_sop && wcnt == 8'(PKT_LEN - 1)) begin
          wact     <= 1'b0;
          wcnt     <= '0;
          full[wb] <= 1'b1;
          wb       <= ~wb;
        end else begin
          wact <= 1'b1;
          wcnt <= (in_sop ? 8'd0 : wcnt) + 1'b1;
        end
      end

      // ---------------- read side -----------------
      rd_issued <= 1'b0;
      if (rd_go) begin
        rd_issued <= 1'b1;
        rd_sop    <= (rs == 8'd0);
        rd_par    <= (rs >= 8'(PKT_LEN));
        rd_last   <= (rs == 8'(PKT_LEN - 1));
        rd_bank   <= rb;
        if (rs < 8'(PKT_LEN)) begin
          sram_ce_n[rb] <= 1'b0;
          sram_oe_n[rb] <= 1'b0;
          sram_addr[rb] <= AW'(rs);
        end
        ract  <= (rs != 8'(CW_LEN - 1));
        rslot <= (rs == 8'(CW_LEN - 1)) ? 8'd0 : rs + 1'b1;
      end
      if (rd_issued) begin
        out_valid <= 1'b1;
        out_sop   <= rd_sop;
        out_data  <= rd_par ? 8'd0 : sram_rdata[rd_bank];
        if (rd_last) begin
          full[rd_bank] <= 1'b0;
          rb            <= ~rd_bank;
        end
      end
    end
  end

  // The reader never touches the chip the writer is filling.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(do_write && rd_go && (rs < 8'(PKT_LEN)) && (rb == wb)))
    else $error("sram_converter: read and write on the same SRAM");

endmodule
