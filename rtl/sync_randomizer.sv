// sync_randomizer: MPEG-2 packet synchronizer and energy-dispersal randomizer.
//
// The synchronizer finds the 47h sync byte in the incoming byte stream, then
// counts 188-byte packets and checks that every packet starts with 47h; a
// missing sync byte drops lock and hunting starts again. Only packets seen
// while locked are passed on. The randomizer XORs the 187 data bytes of each
// packet with a pseudo-random binary sequence from the generator
// 1 + x^14 + x^15, MSB first. The generator is loaded with 100101010000000 at
// the start of every group of eight packets, and the sync byte of the first
// packet of the group is sent inverted (B8h) to mark that point for the
// derandomizer. The sync bytes of the other seven packets are sent unchanged
// (47h) while the generator keeps running through them.
//
// Interface: in_valid/in_data, one byte per strobe (any spacing). Outputs are
// registered one cycle later: out_valid, out_data, out_sop (sync byte of a
// packet), out_group (first packet of a group of eight). locked shows the
// synchronizer state.
//
// The generator polynomial, the seed, the eight-packet period and the B8h
// inversion follow the transmitter description. The hunting rule, and keeping
// the generator running during non-inverted sync bytes (the usual DVB/DAVIC
// convention), are this design's choices.
module sync_randomizer
  import tx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_sop,
  output logic       out_group,
  output logic       locked
);

  logic [7:0]  byte_cnt;      // position in packet, 0 = sync byte
  logic [2:0]  pkt_cnt;       // packet number within the group of eight
  logic [14:0] prbs;          // bit 14 = stage 1, bit 0 = stage 15

  // Eight PRBS steps: the byte to XOR and the next register state.
  function automatic logic [22:0] prbs_step8(input logic [14:0] s);
    logic [7:0] o;
    logic       fb;
    for (int i = 7; i >= 0; i--) begin
      fb   = s[1] ^ s[0];              // stage 14 xor stage 15
      o[i] = fb;
      s    = {fb, s[14:1]};
    end
    return {o, s};
  endfunction

  logic [7:0]  prbs_byte;
  logic [14:0] prbs_next;
  assign {prbs_byte, prbs_next}           = prbs_step8(prbs);

  wire at_sync = in_valid && (!locked || byte_cnt == 8'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked    <= 1'b0;
      byte_cnt  <= '0;
      pkt_cnt   <= '0;
      prbs      <= PRBS_SEED;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
      out_group <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_group <= 1'b0;
      if (at_sync) begin
        if (in_data == SYNC_BYTE) begin
          // sync byte of a packet
          locked    <= 1'b1;
          byte_cnt  <= 8'd1;
          out_valid <= 1'b1;
          out_sop   <= 1'b1;
          if (!locked || pkt_cnt == 3'd0) begin
            // first packet of a group: invert sync, reload the generator
            out_data  <= SYNC_INV;
            out_group <= 1'b1;
            prbs      <= PRBS_SEED;
            pkt_cnt   <= 3'd1;
          end else begin
            out_data  <= SYNC_BYTE;
            prbs      <= prbs_next;    // generator runs, output unused
            pkt_cnt   <= pkt_cnt + 1'b1;
          end
        end else begin
          locked   <= 1'b0;            // sync lost or not yet found
          byte_cnt <= '0;
          pkt_cnt  <= '0;
        end
      end else if (in_valid) begin
        out_valid <= 1'b1;
        out_data  <= in_data ^ prbs_byte;
        prbs      <= prbs_next;
        byte_cnt  <= (byte_cnt == 8'(PKT_LEN - 1)) ? 8'd0 : byte_cnt + 1'b1;
      end
    end
  end

endmodule
