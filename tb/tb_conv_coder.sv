// tb_conv_coder: checks the 8-bit parallel K = 7 (171, 133) convolutional coder.
// 600 random bytes (plus 00h and FFh) go in, one every 8..12 cycles. The
// reference codes the same bits one at a time, MSB first, with its own shift
// register. The first coded word (pairs of bits 7..4) must appear one cycle
// after the strobe and the second (bits 3..0) four cycles after the first,
// each as {X,Y,X,Y,X,Y,X,Y}, and nothing in between. The impulse 80h from
// the zero state must give the generator patterns themselves.
module tb_conv_coder;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0] in_data = '0;
  logic out_valid;
  logic [7:0] out_data;
  int checks = 0, failures = 0;

  conv_coder dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .in_data(in_data), .out_valid(out_valid), .out_data(out_data));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cc_state_t sr;
    logic [15:0] e;
    logic [7:0] d;
    for (int k = 1; k <= 6; k++) sr[k] = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 602; n++) begin
      d = (n == 0) ? 8'h80 : (n == 1) ? 8'h00 : (n == 2) ? 8'hFF : 8'($urandom);
      for (int b = 7; b >= 0; b--) e[2*b +: 2] = cc_bit(sr, d[b]);
      if (n == 0) begin
        checks++;
        // impulse response: X = 1111001..., Y = 1011011... (first 4 bits here)
        if (e[15:8] != 8'b11_10_11_11) begin
          failures++;
          $display("FAIL reference impulse %b", e[15:8]);
        end
      end
      in_valid = 1'b1;
      in_data  = d;
      @(posedge clk); #1;
      in_valid = 1'b0;
      for (int c = 0; c < 8; c++) begin
        checks++;
        if (c == 0 || c == 4) begin
          if (!out_valid || out_data !== ((c == 0) ? e[15:8] : e[7:0])) begin
            failures++;
            $display("FAIL byte %0d half %0d: v=%b %b expected %b", n, c / 4, out_valid, out_data,
                     (c == 0) ? e[15:8] : e[7:0]);
          end
        end else if (out_valid) begin
          failures++;
          $display("FAIL byte %0d: extra output at cycle %0d", n, c);
        end
        if (c < 7) begin @(posedge clk); #1; end
      end
      repeat ($urandom_range(0, 4)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
