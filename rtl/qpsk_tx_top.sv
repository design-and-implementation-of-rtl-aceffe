// qpsk_tx_top: all-digital QPSK transmitter for MPEG-2 transport packets.
//
// Chain: synchronizer/randomizer -> SRAM converter (two external SRAMs) ->
// shortened RS(204,188) coder -> rate-1/2 K=7 convolutional coder ->
// QPSK modulator with ROM-based root-raised-cosine filter and IF mixer.
// The whole chip runs on one master clock, clk, at the coded symbol rate:
// each clock the modulator delivers the four IF samples of one symbol as
// four parallel signed 10-bit words. The clock generator turns clk into
// enable strobes: en[3] (every 8th clock) is the 204-rate byte slot, since a
// byte becomes 16 coded bits = 8 QPSK symbols; the fractional rate generator
// lets 47 of every 51 slots through as the 188-rate input byte strobe
// mpeg_en. The MPEG-2 source must present a byte on mpeg_data in every cycle
// in which mpeg_en is high.
//
// Latency from an input byte to its first IF sample is a packet and a few
// slots, set by the packet buffer in the external SRAM.
//
// Ports: clk, rst_n; mpeg_data in, mpeg_en out; the two SRAM interfaces;
// mod_valid and mod_sample[0:3] (S(4k), S(4k+1), S(4k+2), S(4k+3)); test
// outputs with the RS coder's output byte stream, the convolutional coder's
// output, the clock strobes and status flags.
//
// The block structure, the 188/204 clocking, the SRAM ping-pong buffer and
// the four parallel 10-bit outputs follow the transmitter description; running
// from one clock with enables is this design's choice.
module qpsk_tx_top
  import tx_pkg::*;
#(
  parameter int unsigned SRAM_AW     = 15,
  parameter int unsigned GF_PIPE     = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // MPEG-2 transport stream input
  input  logic [7:0]              mpeg_data,
  output logic                    mpeg_en,
  // two external SRAM chips
  output logic [1:0]              sram_ce_n,
  output logic [1:0]              sram_oe_n,
  output logic [1:0]              sram_we_n,
  output logic [1:0][SRAM_AW-1:0] sram_addr,
  output logic [1:0][7:0]         sram_wdata,
  input  logic [1:0][7:0]         sram_rdata,
  // modulated IF output, four samples per symbol
  output logic                    mod_valid,
  output tap_t                    mod_sample [4],
  // test outputs
  output logic                    test_rs_valid,
  output logic [7:0]              test_rs_data,
  output logic                    test_rs_sop,
  output logic                    test_rs_parity,
  output logic                    test_cc_valid,
  output logic [7:0]              test_cc_data,
  output logic [3:0]              test_clk_en,
  output logic [2:0]              test_clk_phase,
  output logic [5:0]              test_frac_slot,
  output logic                    test_group,
  output logic                    test_locked,
  output logic                    test_overflow,
  output logic                    test_underflow
);

  logic [3:0] en;

  inner_clk_gen #(.DIV_W(3)) u_clkgen (
    .clk(clk), .rst_n(rst_n), .en(en), .phase(test_clk_phase)
  );

  frac_rate_gen u_frac (
    .clk(clk), .rst_n(rst_n), .en_204(en[3]), .en_188(mpeg_en), .slot(test_frac_slot)
  );

  logic       rnd_valid, rnd_sop;
  logic [7:0] rnd_data;

  sync_randomizer u_sync (
    .clk(clk), .rst_n(rst_n),
    .in_valid(mpeg_en), .in_data(mpeg_data),
    .out_valid(rnd_valid), .out_data(rnd_data), .out_sop(rnd_sop),
    .out_group(test_group), .locked(test_locked)
  );

  logic       cv_valid, cv_sop;
  logic [7:0] cv_data;

  sram_converter #(.AW(SRAM_AW)) u_conv (
    .clk(clk), .rst_n(rst_n), .slot_en(en[3]),
    .in_valid(rnd_valid), .in_sop(rnd_sop), .in_data(rnd_data),
    .sram_ce_n(sram_ce_n), .sram_oe_n(sram_oe_n), .sram_we_n(sram_we_n),
    .sram_addr(sram_addr), .sram_wdata(sram_wdata), .sram_rdata(sram_rdata),
    .out_valid(cv_valid), .out_sop(cv_sop), .out_data(cv_data),
    .overflow(test_overflow)
  );

  rs_encoder #(.PIPE_STAGES(GF_PIPE)) u_rs (
    .clk(clk), .rst_n(rst_n),
    .in_valid(cv_valid), .in_sop(cv_sop), .in_data(cv_data),
    .out_valid(test_rs_valid), .out_data(test_rs_data),
    .out_sop(test_rs_sop), .out_parity(test_rs_parity)
  );

  conv_coder #(.HALF_GAP(4)) u_cc (
    .clk(clk), .rst_n(rst_n),
    .in_valid(test_rs_valid), .in_data(test_rs_data),
    .out_valid(test_cc_valid), .out_data(test_cc_data)
  );

  qpsk_mod u_mod (
    .clk(clk), .rst_n(rst_n),
    .in_valid(test_cc_valid), .in_data(test_cc_data),
    .out_valid(mod_valid), .out_sample(mod_sample),
    .underflow(test_underflow)
  );

  assign test_clk_en = en;

endmodule
