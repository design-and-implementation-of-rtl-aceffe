// tb_inner_clk_gen: checks the four rate strobes of the clock generator.
// After reset, in cycle c (c = 0, 1, ...) strobe en[k] must be high exactly
// when c mod 2^k = 2^k - 1, so en[3] fires once in 8 cycles, en[2] once in 4,
// en[1] once in 2 and en[0] every cycle. Also counts the strobes over 800
// cycles (100, 200, 400, 800).
module tb_inner_clk_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] en;
  logic [2:0] phase;
  int checks = 0, failures = 0;
  int cnt [4] = '{0, 0, 0, 0};

  inner_clk_gen dut (.clk(clk), .rst_n(rst_n), .en(en), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 800; c++) begin
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (en[k] !== ((c % (1 << k)) == (1 << k) - 1)) begin
          failures++;
          $display("FAIL cycle %0d en[%0d]=%b", c, k, en[k]);
        end
        if (en[k]) cnt[k]++;
      end
      checks++;
      if (phase != 3'(c)) failures++;
      @(posedge clk); #1;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (cnt[k] != 800 / (1 << k)) begin
        failures++;
        $display("FAIL en[%0d] count %0d", k, cnt[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
