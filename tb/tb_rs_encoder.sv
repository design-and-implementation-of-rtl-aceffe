// tb_rs_encoder: checks the shortened RS(204,188) encoder.
// Six code words are sent back to back, one byte slot every 8..12 cycles,
// mostly at the minimum of 8 (= PIPE_STAGES, where the products of one byte
// meet the next byte and the bypass is used): an
// all-zero packet, a packet starting with the inverted sync byte B8h and four
// random packets. For each word the output must repeat the 188 message bytes
// unchanged one cycle after each input strobe, flag the 16 parity slots, mark
// slot 0, and the 204 bytes must form a valid code word: all 16 syndromes
// c(alpha^i), i = 0..15, are zero (computed with log/antilog tables). An
// all-zero packet must give all-zero parity.
module tb_rs_encoder;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sop = 1'b0;
  logic [7:0] in_data = '0;
  logic out_valid, out_sop, out_parity;
  logic [7:0] out_data;
  int checks = 0, failures = 0;

  rs_encoder dut (.clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_sop(in_sop), .in_data(in_data),
    .out_valid(out_valid), .out_data(out_data), .out_sop(out_sop), .out_parity(out_parity));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] msg [188];
    logic [7:0] cw [];
    bit par_zero;
    gf_init();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < 6; w++) begin
      for (int k = 0; k < 188; k++)
        msg[k] = (w == 0) ? 8'h00 : (k == 0) ? ((w == 1) ? 8'hB8 : 8'h47) : 8'($urandom);
      cw = new[204];
      par_zero = 1'b1;
      for (int k = 0; k < 204; k++) begin
        in_valid = 1'b1;
        in_sop   = (k == 0);
        in_data  = (k < 188) ? msg[k] : 8'($urandom);   // parity slots carry no data
        @(posedge clk); #1;
        in_valid = 1'b0;
        in_sop   = 1'b0;
        checks++;
        if (!out_valid || out_sop !== (k == 0) || out_parity !== (k >= 188)) begin
          failures++;
          $display("FAIL word %0d slot %0d flags v=%b sop=%b par=%b", w, k, out_valid, out_sop, out_parity);
        end
        if (k < 188) begin
          checks++;
          if (out_data !== msg[k]) begin
            failures++;
            $display("FAIL word %0d byte %0d: %02h expected %02h", w, k, out_data, msg[k]);
          end
        end else if (out_data != 0) par_zero = 1'b0;
        cw[k] = out_data;
        repeat ((k % 3 == 0) ? 7 : $urandom_range(7, 11)) @(posedge clk);
        #1;
      end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (rs_syndrome(cw, i) != 8'h00) begin
          failures++;
          $display("FAIL word %0d syndrome %0d = %02h", w, i, rs_syndrome(cw, i));
        end
      end
      if (w == 0) begin
        checks++;
        if (!par_zero) begin
          failures++;
          $display("FAIL zero packet has non-zero parity");
        end
      end
      $display("word %0d parity %02h %02h ... %02h", w, cw[188], cw[189], cw[203]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
