// tb_qpsk_tx_top: end-to-end test of the transmitter at its default sizes.
//
// A source delivers 29 junk bytes and then 20 MPEG-2 packets (47h + 187
// random bytes) on the 188-rate strobe; packet 10 has a corrupted sync byte.
// Two behavioural SRAMs sit on the memory ports. The test checks, all with
// independent reference models:
//   * RS coder output: every code word repeats the expected randomized packet
//     (B8h at each group start, PRBS reloaded there, the corrupted packet
//     dropped and a new group started on relock) and its 204 bytes have all
//     16 syndromes zero;
//   * convolutional coder output against a bit-serial K = 7 coder fed with
//     the RS output;
//   * every modulator sample against a direct filter sum over the symbol
//     history;
//   * rate: between two code words in steady state the modulator delivers
//     exactly 204 * 8 = 1632 symbol words (one per clock), and the input
//     strobe takes exactly 188 bytes in every 1632 clocks.
// Mechanisms that must each happen at least once: inverted sync / PRBS
// reload, lock loss and relock, writes to both SRAM chips (ping-pong swap),
// parity slots, and modulator underflow (the gap left by the dropped packet).
module tb_qpsk_tx_top;
  import tx_pkg::*;
  import tb_ref_pkg::*;
  localparam int AW = 15;
  localparam int NPKT = 20, BAD = 10;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [7:0] mpeg_data;
  logic mpeg_en;
  logic [1:0] ce_n, oe_n, we_n;
  logic [1:0][AW-1:0] addr;
  logic [1:0][7:0] wdata, rdata;
  logic mod_valid;
  tap_t mod_sample [4];
  logic rs_valid, rs_sop, rs_parity, cc_valid, locked, overflow, underflow, group;
  logic [7:0] rs_data, cc_data;
  logic [3:0] clk_en;
  logic [2:0] clk_phase;
  logic [5:0] frac_slot;

  int checks = 0, failures = 0;

  qpsk_tx_top dut (
    .clk(clk), .rst_n(rst_n), .mpeg_data(mpeg_data), .mpeg_en(mpeg_en),
    .sram_ce_n(ce_n), .sram_oe_n(oe_n), .sram_we_n(we_n), .sram_addr(addr),
    .sram_wdata(wdata), .sram_rdata(rdata),
    .mod_valid(mod_valid), .mod_sample(mod_sample),
    .test_rs_valid(rs_valid), .test_rs_data(rs_data), .test_rs_sop(rs_sop),
    .test_rs_parity(rs_parity), .test_cc_valid(cc_valid), .test_cc_data(cc_data),
    .test_clk_en(clk_en), .test_clk_phase(clk_phase), .test_frac_slot(frac_slot),
    .test_group(group), .test_locked(locked), .test_overflow(overflow),
    .test_underflow(underflow));

  for (genvar b = 0; b < 2; b++) begin : g_ram
    sram_model #(.AW(AW)) u_ram (.clk(clk), .ce_n(ce_n[b]), .oe_n(oe_n[b]), .we_n(we_n[b]),
      .addr(addr[b]), .wdata(wdata[b]), .rdata(rdata[b]));
  end

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- source ----------------
  logic [7:0] src [$];
  int src_idx = 0;
  assign mpeg_data = (src_idx < src.size()) ? src[src_idx] : 8'h00;
  always @(posedge clk) if (rst_n && mpeg_en) src_idx <= src_idx + 1;

  // ---------------- expected streams -------
  logic [7:0] exp_msg [$];         // expected RS message bytes, in order
  int exp_words = 0;

  // ---------------- counters --------------
  int n_group = 0, n_lock = 0, n_unlock = 0, n_parity = 0, n_words = 0;
  int n_underflow = 0, n_cc = 0, n_sym = 0, n_rate_ok = 0;
  bit was_locked = 0, was_under = 0;

  // RS monitor
  logic [7:0] cw [];
  int cw_pos = -1;
  int last_sop_sym = -1;
  bit prev_word_full = 0;
  cc_state_t sr;
  logic [7:0] exp_cc [$];
  int isym [$], qsym [$];

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
    if (locked && !was_locked) n_lock++;
    if (!locked && was_locked) n_unlock++;
    was_locked <= locked;
    if (underflow && !was_under) n_underflow++;
    was_under <= underflow;
    if (group) n_group++;

    if (rs_valid) begin
      logic [15:0] e;
      if (rs_sop) begin
        // rate check: a full previous word with no gap is 1632 symbols
        if (last_sop_sym > 0 && prev_word_full && !underflow_in_word) begin
          checks++;
          if (n_sym - last_sop_sym != 1632) begin
            failures++;
            $display("FAIL %0d symbols per code word", n_sym - last_sop_sym);
          end else n_rate_ok++;
        end
        last_sop_sym = n_sym;
        underflow_in_word = 0;
        cw = new[204];
        cw_pos = 0;
      end
      if (cw_pos >= 0 && cw_pos < 204) begin
        cw[cw_pos] = rs_data;
        checks++;
        if (rs_parity !== (cw_pos >= 188)) begin
          failures++;
          $display("FAIL parity flag at byte %0d", cw_pos);
        end
        if (cw_pos < 188) begin
          logic [7:0] em;
          em = (exp_msg.size() > 0) ? exp_msg.pop_front() : 8'hxx;
          checks++;
          if (rs_data !== em) begin
            failures++;
            $display("FAIL word %0d byte %0d: %02h expected %02h", n_words, cw_pos, rs_data, em);
          end
        end else n_parity++;
        cw_pos++;
        if (cw_pos == 204) begin
          for (int i = 0; i < 16; i++) begin
            checks++;
            if (rs_syndrome(cw, i) != 0) begin
              failures++;
              $display("FAIL word %0d syndrome %0d", n_words, i);
            end
          end
          n_words++;
          prev_word_full = 1;
        end
      end
      // reference convolutional coder and symbol history
      for (int b = 7; b >= 0; b--) begin
        logic [1:0] xy;
        xy = cc_bit(sr, rs_data[b]);
        e[2*b +: 2] = xy;
        isym.push_back(xy[1] ? -1 : 1);
        qsym.push_back(xy[0] ? -1 : 1);
      end
      exp_cc.push_back(e[15:8]);
      exp_cc.push_back(e[7:0]);
    end

    if (cc_valid) begin
      logic [7:0] ec;
      ec = (exp_cc.size() > 0) ? exp_cc.pop_front() : 8'hxx;
      checks++;
      if (cc_data !== ec) begin
        failures++;
        $display("FAIL coded word %0d: %02h expected %02h", n_cc, cc_data, ec);
      end
      n_cc++;
    end

    if (mod_valid) begin
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (int'(mod_sample[p]) != ref_sample(n_sym, p)) begin
          failures++;
          if (failures < 20)
            $display("FAIL symbol %0d phase %0d: %0d expected %0d", n_sym, p,
                     int'(mod_sample[p]), ref_sample(n_sym, p));
        end
      end
      n_sym++;
    end else if (n_sym > 0) underflow_in_word = 1;
  end

  bit underflow_in_word = 0;

  // input rate: 188 input strobes in every 204 byte slots (1632 clocks)
  int cyc_run = 0, n_in = 0;
  always @(posedge clk) if (rst_n) begin
    if (cyc_run < 1632 * 10 && mpeg_en) n_in++;
    cyc_run++;
  end

  initial begin
    stages_t st;
    int grp;
    logic [7:0] d;
    for (int k = 1; k <= 6; k++) sr[k] = 1'b0;
    gf_init();
    // build the source and the expected RS message stream
    for (int i = 0; i < 29; i++) src.push_back(8'($urandom_range(8'h50, 8'hFE)));
    grp = 0;
    for (int p = 0; p < NPKT; p++) begin
      bit bad;
      bad = (p == BAD);
      src.push_back(bad ? 8'h4F : 8'h47);
      if (!bad) begin
        if (grp == 0) begin st = prbs_seed(); exp_msg.push_back(8'hB8); end
        else begin void'(prbs_byte(st)); exp_msg.push_back(8'h47); end
        exp_words++;
      end
      for (int k = 1; k < 188; k++) begin
        d = 8'($urandom);
        if (bad && d == 8'h47) d = 8'h48;
        src.push_back(d);
        if (!bad) exp_msg.push_back(d ^ prbs_byte(st));
      end
      grp = bad ? 0 : (grp + 1) % 8;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (src_idx >= src.size());
    repeat (204 * 8 * 3) @(posedge clk);

    checks++;
    if (n_words != exp_words || exp_msg.size() != 0) begin
      failures++;
      $display("FAIL %0d code words out of %0d, %0d bytes missing", n_words, exp_words, exp_msg.size());
    end
    checks++;
    if (n_sym != 8 * 204 * n_words) begin
      failures++;
      $display("FAIL %0d symbols for %0d words", n_sym, n_words);
    end
    checks++;
    if (overflow) begin
      failures++;
      $display("FAIL packet buffer overflow");
    end
    // every mechanism must have happened
    checks++; if (n_group < 3)                 begin failures++; $display("FAIL no group restart"); end
    checks++; if (n_lock < 2 || n_unlock < 1)  begin failures++; $display("FAIL no lock loss / relock"); end
    checks++; if (g_ram[0].u_ram.writes == 0 || g_ram[1].u_ram.writes == 0)
                                               begin failures++; $display("FAIL one SRAM never used"); end
    checks++; if (n_parity != 16 * n_words)    begin failures++; $display("FAIL parity slots %0d", n_parity); end
    checks++; if (n_underflow < 1)             begin failures++; $display("FAIL no modulator underflow"); end
    checks++; if (n_in != 188 * 10)            begin failures++; $display("FAIL %0d input bytes in 10 packet times", n_in); end
    checks++; if (n_rate_ok < 10)              begin failures++; $display("FAIL rate checked only %0d times", n_rate_ok); end
    $display("words=%0d symbols=%0d groups=%0d locks=%0d unlocks=%0d sram_writes=%0d/%0d parity=%0d underflows=%0d rate_ok=%0d",
             n_words, n_sym, n_group, n_lock, n_unlock, g_ram[0].u_ram.writes, g_ram[1].u_ram.writes,
             n_parity, n_underflow, n_rate_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
