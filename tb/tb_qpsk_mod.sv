// tb_qpsk_mod: checks the ROM-based QPSK modulator.
// 400 random 8-bit words (four I/Q pairs each) are fed one every four cycles,
// the rate at which the modulator uses them up, so a symbol enters every
// cycle. The reference keeps its own +/-1 symbol history (bit 0 -> +1; the
// windows start all +1) and computes, with multiplications, for symbol n:
//   S(4n)   =  sum_j I[n-j] h[4j]     S(4n+1) =  sum_j Q[n-j] h[4j+1]
//   S(4n+2) = -sum_j I[n-j] h[4j+2]   S(4n+3) = -sum_j Q[n-j] h[4j+3]
// with h the root-raised-cosine taps. Each symbol's four samples must appear
// one cycle after it enters, in consecutive cycles with no gap. Then the
// input stops, which must raise the underflow flag. A final constant-symbol
// run checks the DC values against the sums of the taps.
module tb_qpsk_mod;
  import tx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0] in_data = '0;
  logic out_valid, underflow;
  tap_t out_sample [4];
  int checks = 0, failures = 0;
  int isym [$], qsym [$];
  int n_out = 0, n_gap = 0;
  bit running = 0;

  qpsk_mod dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid), .out_sample(out_sample), .underflow(underflow));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sample(input int n, input int p);
    int acc = 0, s;
    for (int j = 0; j < SPAN; j++) begin
      if (n - j < 0) s = 1;
      else s = (p % 2 == 0) ? isym[n - j] : qsym[n - j];
      acc += s * int'(SRRC_TAPS[4*j + p]);
    end
    return (p >= 2) ? -acc : acc;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (int'(out_sample[p]) != ref_sample(n_out, p)) begin
          failures++;
          $display("FAIL symbol %0d phase %0d: %0d expected %0d", n_out, p,
                   int'(out_sample[p]), ref_sample(n_out, p));
        end
      end
      n_out++;
    end else if (running && n_out > 0) n_gap++;
  end

  initial begin
    logic [7:0] d;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    running = 1;
    for (int w = 0; w < 440; w++) begin
      d = (w < 400) ? 8'($urandom) : 8'hFF;     // last 40 words: all symbols -1
      for (int k = 0; k < 4; k++) begin
        isym.push_back(d[7 - 2*k] ? -1 : 1);
        qsym.push_back(d[6 - 2*k] ? -1 : 1);
      end
      in_valid = 1'b1; in_data = d;
      @(posedge clk); #1;
      in_valid = 1'b0;
      checks++;
      if (underflow) begin
        failures++;
        $display("FAIL underflow while fed at full rate");
      end
      repeat (3) @(posedge clk);
      #1;
    end
    running = 0;
    repeat (8) @(posedge clk);
    #1;
    checks++;
    if (n_out != 440 * 4 || n_gap != 0) begin
      failures++;
      $display("FAIL %0d symbols out, %0d gaps", n_out, n_gap);
    end
    checks++;
    if (!underflow) begin
      failures++;
      $display("FAIL no underflow after the input stopped");
    end
    // DC check: after a long run of -1 symbols, S(4n) = -sum h[4j]
    begin
      int dc;
      dc = 0;
      for (int j = 0; j < SPAN; j++) dc += int'(SRRC_TAPS[4*j]);
      checks++;
      if (ref_sample(440 * 4 - 1, 0) != -dc) failures++;
    end
    $display("symbols=%0d gaps=%0d underflow=%b", n_out, n_gap, underflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
