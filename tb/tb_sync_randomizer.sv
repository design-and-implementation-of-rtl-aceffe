// tb_sync_randomizer: checks synchronization and energy-dispersal randomizing.
// The stream starts with 37 bytes of junk (no 47h), then 20 packets of 188
// bytes (47h + 187 random bytes) sent one byte every 1..3 cycles; packet 12
// has a corrupted sync byte, which must drop lock, discard that packet and
// relock on packet 13 with a fresh group of eight. Expected output is built
// with the bit-serial reference PRBS: first packet of each group B8h, others
// 47h, data XOR PRBS with the generator reloaded at each group start and
// running through the non-inverted sync bytes. Also checks the first PRBS
// bytes against the known sequence 03h F6h 08h.
module tb_sync_randomizer;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0] in_data = '0;
  logic out_valid, out_sop, out_group, locked;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  logic [7:0] exp_q [$];
  bit exp_sop [$], exp_grp [$];
  int n_groups = 0, n_lock_loss = 0;
  bit was_locked = 0;

  sync_randomizer dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid), .out_data(out_data), .out_sop(out_sop), .out_group(out_group),
    .locked(locked));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare every output byte with the expected stream
  always @(posedge clk) if (rst_n) begin
    if (was_locked && !locked) n_lock_loss++;
    was_locked <= locked;
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %02h", out_data);
      end else begin
        logic [7:0] e;
        bit es, eg;
        e  = exp_q.pop_front();
        es = exp_sop.pop_front();
        eg = exp_grp.pop_front();
        if (out_data !== e || out_sop !== es || out_group !== eg) begin
          failures++;
          $display("FAIL out %02h sop %b grp %b, expected %02h %b %b", out_data, out_sop, out_group, e, es, eg);
        end
        if (out_group) n_groups++;
      end
    end
  end

  task automatic send(input logic [7:0] d);
    in_valid = 1'b1;
    in_data  = d;
    @(posedge clk); #1;
    in_valid = 1'b0;
    repeat ($urandom_range(0, 2)) @(posedge clk);
    #1;
  endtask

  initial begin
    stages_t st;
    int pk_in_group;
    logic [7:0] d;
    gf_init();
    st = prbs_seed();
    checks++;
    if (prbs_byte(st) != 8'h03 || prbs_byte(st) != 8'hF6 || prbs_byte(st) != 8'h08) begin
      failures++;
      $display("FAIL reference PRBS start");
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 37; i++) send(8'(($urandom_range(0, 250) + 8'h48)));
    pk_in_group = 0;
    for (int p = 0; p < 20; p++) begin
      bit bad;
      bad = (p == 12);
      if (!bad) begin
        if (pk_in_group == 0) begin
          st = prbs_seed();
          exp_q.push_back(8'hB8);
        end else begin
          void'(prbs_byte(st));      // generator runs through the sync byte
          exp_q.push_back(8'h47);
        end
        exp_sop.push_back(1'b1);
        exp_grp.push_back(pk_in_group == 0);
      end
      send(bad ? 8'h46 : 8'h47);
      for (int k = 1; k < 188; k++) begin
        d = 8'($urandom);
        if (d == 8'h47) d = 8'h11;   // keep hunting deterministic after the bad sync
        if (!bad) begin
          exp_q.push_back(d ^ prbs_byte(st));
          exp_sop.push_back(1'b0);
          exp_grp.push_back(1'b0);
        end
        send(d);
      end
      if (bad) pk_in_group = 0;
      else     pk_in_group = (pk_in_group + 1) % 8;
    end
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d bytes missing", exp_q.size());
    end
    checks++;
    if (n_groups != 3 || n_lock_loss != 1) begin
      failures++;
      $display("FAIL groups %0d lock losses %0d", n_groups, n_lock_loss);
    end
    $display("groups=%0d lock_losses=%0d", n_groups, n_lock_loss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
