// rs_encoder: shortened RS(204,188) systematic encoder, t = 8.
//
// A 188-byte packet is encoded as if it were preceded by 51 zero bytes in an
// RS(255,239) code word; since leading zeros leave the encoder's state at zero
// they need no clock cycles, and the 51 zero bytes never appear at the output.
// The "RS base" is a 16-stage byte shift memory r[0..15] with a feedback loop
// (the usual division by g(x) = prod_{i=0}^{15} (x + alpha^i), alpha = 02h,
// over GF(2^8) with f(x) = x^8 + x^4 + x^3 + x^2 + 1). For each message byte
// the feedback fb = d ^ r[15] is multiplied by the 16 generator coefficients
// in 16 pipelined standard-basis multipliers (gf_mult), and when the products
// arrive PIPE_STAGES cycles later the memory is updated
// r[i] <= r[i-1] ^ g_i*fb. After the 188th message byte the 16 parity bytes
// are moved into a separate output memory and the encoding memory is cleared,
// so the next packet can start at once. A byte counter is the controller; its
// signal S is high for the 188 message slots and low for the 16 parity slots.
//
// Interface: one input strobe per byte slot, 204 per code word; in_sop marks
// slot 0. Slots 0..187 carry message bytes; slots 188..203 carry no data and
// return the parity bytes, highest-degree coefficient first. Outputs
// (out_valid, out_data, out_sop, out_parity) are registered one cycle after
// the input strobe. Input strobes must be at least PIPE_STAGES cycles apart
// (an assertion checks it). With the default, a fully bit-level pipelined
// multiplier of 8 stages, the products of one byte arrive in the very cycle
// the next byte does (byte slots are 8 clocks apart in the transmitter), so
// the new feedback byte and the parity output are taken from the memory
// contents as updated in that cycle (a bypass around the register).
//
// The shortening, field, generator polynomial, parity output memory and the
// multiplier array follow the transmitter description. The strobe interface
// and the update timing are this design's choices.
module rs_encoder
  import tx_pkg::*;
#(
  parameter int unsigned PIPE_STAGES = GF_M
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_sop,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_sop,
  output logic       out_parity
);

  logic [7:0] r    [PAR_LEN];   // RS base: encoding memory
  logic [7:0] pbuf [PAR_LEN];   // parity output memory
  logic [7:0] prod [PAR_LEN];
  logic [PAR_LEN-1:0] prod_valid;
  logic [7:0] cnt;              // byte slot 0..203 of the code word
  logic       last_pend;        // update in flight belongs to byte 187
  logic       busy;             // multiplication in flight

  wire  [7:0] idx     = in_sop ? 8'd0 : cnt;
  wire        s_msg   = idx < 8'(PKT_LEN);          // controller signal S
  wire        upd     = prod_valid[0];              // products of the last byte arrive

  // Memory contents as they stand after this cycle's update. When the
  // products arrive in the same cycle as the next byte (PIPE_STAGES equal to
  // the byte spacing) the new byte must already see the updated values.
  logic [7:0] r_new   [PAR_LEN];
  logic [7:0] r_eff   [PAR_LEN];
  logic [7:0] pbuf_eff[PAR_LEN];
  always_comb begin
    for (int i = 0; i < PAR_LEN; i++) begin
      r_new[i]    = ((i == 0) ? 8'd0 : r[(i == 0) ? 0 : i-1]) ^ prod[i];
      r_eff[i]    = upd ? (last_pend ? 8'd0 : r_new[i]) : r[i];
      pbuf_eff[i] = (upd && last_pend) ? r_new[i] : pbuf[i];
    end
  end

  wire  [7:0] fb      = in_data ^ r_eff[PAR_LEN-1];
  wire        mul_go  = in_valid && s_msg;

  for (genvar i = 0; i < PAR_LEN; i++) begin : g_mul
    gf_mult #(.M(GF_M), .POLY(GF_POLY), .PIPE_STAGES(PIPE_STAGES)) u_mul (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (mul_go),
      .a        (fb),
      .b        (RS_GEN[i]),
      .out_valid(prod_valid[i]),
      .p        (prod[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < PAR_LEN; i++) begin
        r[i]    <= '0;
        pbuf[i] <= '0;
      end
      cnt        <= '0;
      last_pend  <= 1'b0;
      busy       <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_sop    <= 1'b0;
      out_parity <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_sop   <= in_valid && in_sop;
      // the RS base and the parity output memory take their updated values
      for (int i = 0; i < PAR_LEN; i++) begin
        r[i]    <= r_eff[i];
        pbuf[i] <= pbuf_eff[i];
      end
      if (upd) begin
        busy      <= 1'b0;
        last_pend <= 1'b0;
      end
      if (in_valid) begin
        cnt        <= (idx == 8'(CW_LEN - 1)) ? 8'd0 : idx + 1'b1;
        out_parity <= !s_msg;
        if (s_msg) begin
          out_data  <= in_data;
          busy      <= 1'b1;
          last_pend <= (idx == 8'(PKT_LEN - 1));
        end else begin
          // parity slot: emit the highest-degree byte and shift
          out_data <= pbuf_eff[PAR_LEN-1];
          for (int i = PAR_LEN - 1; i > 0; i--) pbuf[i] <= pbuf_eff[i-1];
          pbuf[0] <= '0;
        end
      end
    end
  end

  // A new byte may arrive no earlier than the cycle the previous products do.
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !busy || upd)
    else $error("rs_encoder: input strobe while a multiplication is in flight");

endmodule
