// tb_frac_rate_gen: checks the 188/204 fractional rate generator.
// en_204 is driven with random gaps. Over any 204 consecutive en_204 slots
// exactly 188 must carry en_188, and over any 51 exactly 47; en_188 may only
// be high together with en_204. Also checks the 6-bit slot counter wraps at 51.
module tb_frac_rate_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en_204 = 1'b0, en_188;
  logic [5:0] slot;
  int checks = 0, failures = 0;
  bit hist [$];

  frac_rate_gen dut (.clk(clk), .rst_n(rst_n), .en_204(en_204), .en_188(en_188), .slot(slot));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, exp_slot;
    exp_slot = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 6000; c++) begin
      en_204 = ($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (en_188 && !en_204) begin
        failures++;
        $display("FAIL en_188 without en_204");
      end
      checks++;
      if (slot != 6'(exp_slot)) begin
        failures++;
        $display("FAIL slot %0d expected %0d", slot, exp_slot);
      end
      if (en_204) begin
        hist.push_back(en_188);
        exp_slot = (exp_slot + 1) % 51;
      end
      @(posedge clk); #1;
    end
    // sliding windows
    for (int s = 0; s + 204 <= hist.size(); s += 7) begin
      ones = 0;
      for (int i = 0; i < 204; i++) ones += hist[s + i];
      checks++;
      if (ones != 188) begin
        failures++;
        $display("FAIL window %0d: %0d of 204", s, ones);
      end
      ones = 0;
      for (int i = 0; i < 51; i++) ones += hist[s + i];
      checks++;
      if (ones != 47) begin
        failures++;
        $display("FAIL window %0d: %0d of 51", s, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
