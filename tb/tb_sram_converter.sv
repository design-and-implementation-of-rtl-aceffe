// tb_sram_converter: checks the two-SRAM packet buffer.
// Byte slots (slot_en) come every 8 cycles. Eight packets arrive at the 188
// rate: in 47 of every 51 slots a byte is offered one cycle after slot_en,
// as the randomizer does. The output must be, for each packet in order, 204
// strobes two cycles after slot_en: the 188 bytes with out_sop on the first,
// then 16 empty (00h) parity slots; once the first code word has started
// there must be no idle slot. Both SRAM chips must be written, alternately,
// and overflow must stay low. Finally packets are offered in every slot,
// faster than they can be read, which must raise overflow.
module tb_sram_converter;
  localparam int AW = 15;
  logic clk = 1'b0, rst_n = 1'b1;
  logic slot_en = 1'b0, in_valid = 1'b0, in_sop = 1'b0;
  logic [7:0] in_data = '0;
  logic [1:0] ce_n, oe_n, we_n;
  logic [1:0][AW-1:0] addr;
  logic [1:0][7:0] wdata, rdata;
  logic out_valid, out_sop, overflow;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  logic [7:0] exp_q [$];
  bit exp_sop [$];
  int cyc = 0, last_slot = -100, started = 0, idle_slots = 0, words = 0;
  bit fast = 0;

  sram_converter dut (.clk(clk), .rst_n(rst_n), .slot_en(slot_en),
    .in_valid(in_valid), .in_sop(in_sop), .in_data(in_data),
    .sram_ce_n(ce_n), .sram_oe_n(oe_n), .sram_we_n(we_n), .sram_addr(addr),
    .sram_wdata(wdata), .sram_rdata(rdata),
    .out_valid(out_valid), .out_sop(out_sop), .out_data(out_data), .overflow(overflow));

  for (genvar b = 0; b < 2; b++) begin : g_ram
    sram_model #(.AW(AW)) u_ram (.clk(clk), .ce_n(ce_n[b]), .oe_n(oe_n[b]), .we_n(we_n[b]),
      .addr(addr[b]), .wdata(wdata[b]), .rdata(rdata[b]));
  end

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real reset edge, before any clock edge

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slot strobes
  always @(posedge clk) begin
    cyc <= cyc + 1;
    slot_en <= ((cyc + 1) % 8 == 0);
  end

  // output monitor
  always @(posedge clk) if (rst_n && !fast) begin
    if (slot_en) last_slot <= cyc;
    if (slot_en && started > 0 && exp_q.size() > 0) begin
      // the slot two cycles from now must carry data; checked below
    end
    if (out_valid) begin
      checks++;
      if (cyc - last_slot != 2) begin
        failures++;
        $display("FAIL output %0d cycles after slot", cyc - last_slot);
      end
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        logic [7:0] e;
        bit es;
        e  = exp_q.pop_front();
        es = exp_sop.pop_front();
        checks++;
        if (out_data !== e || out_sop !== es) begin
          failures++;
          $display("FAIL out %02h sop %b expected %02h %b", out_data, out_sop, e, es);
        end
        if (es) words++;
      end
      started = 1;
    end else if (started > 0 && cyc - last_slot == 2 && exp_q.size() > 0) begin
      idle_slots++;
    end
  end

  initial begin
    int s;
    logic [7:0] d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    s = 0;
    for (int p = 0; p < 8; p++) begin
      for (int k = 0; k < 188; k++) begin
        // wait for a slot that the 47-of-51 pattern lets through
        do begin
          @(posedge clk iff slot_en);
          s++;
        end while (((s - 1) % 51) >= 47);
        #1;
        d = (k == 0) ? 8'h47 : 8'($urandom);
        in_valid = 1'b1; in_sop = (k == 0); in_data = d;
        exp_q.push_back(d); exp_sop.push_back(k == 0);
        @(posedge clk); #1;
        in_valid = 1'b0; in_sop = 1'b0;
      end
      for (int k = 0; k < 16; k++) begin exp_q.push_back(8'h00); exp_sop.push_back(1'b0); end
    end
    repeat (204 * 8 * 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || words != 8) begin
      failures++;
      $display("FAIL %0d bytes missing, %0d words", exp_q.size(), words);
    end
    checks++;
    if (idle_slots != 0) begin
      failures++;
      $display("FAIL %0d idle slots while streaming", idle_slots);
    end
    checks++;
    if (g_ram[0].u_ram.writes != 4 * 188 || g_ram[1].u_ram.writes != 4 * 188) begin
      failures++;
      $display("FAIL writes %0d / %0d", g_ram[0].u_ram.writes, g_ram[1].u_ram.writes);
    end
    checks++;
    if (overflow) begin
      failures++;
      $display("FAIL overflow at the nominal rate");
    end
    // overload: a byte in every slot
    fast = 1;
    for (int p = 0; p < 4; p++)
      for (int k = 0; k < 188; k++) begin
        @(posedge clk iff slot_en); #1;
        in_valid = 1'b1; in_sop = (k == 0); in_data = 8'($urandom);
        @(posedge clk); #1;
        in_valid = 1'b0; in_sop = 1'b0;
      end
    checks++;
    if (!overflow) begin
      failures++;
      $display("FAIL no overflow under overload");
    end
    $display("words=%0d writes=%0d/%0d overflow=%b", words, g_ram[0].u_ram.writes, g_ram[1].u_ram.writes, overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
