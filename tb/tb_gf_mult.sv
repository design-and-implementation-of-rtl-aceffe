// tb_gf_mult: checks the pipelined standard-basis GF(2^8) multiplier.
// Random and corner operands enter every cycle; each product must equal the
// log/antilog table product and appear exactly PIPE_STAGES (8) cycles later,
// together with out_valid. A few gaps in in_valid check that out_valid
// follows them. Also checks alpha * alpha^7 = alpha^8 = 1Dh.
module tb_gf_mult;
  import tb_ref_pkg::*;
  localparam int LAT = 8;   // default: one register per row of cells
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic [7:0] a = '0, b = '0, p;
  int checks = 0, failures = 0;
  logic [7:0] exp_p [$];
  bit         exp_v [$];

  gf_mult dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .p(p));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gf_init();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < LAT; i++) begin exp_p.push_back(8'h00); exp_v.push_back(1'b0); end
    for (int c = 0; c < 3000; c++) begin
      case (c)
        0: begin a = 8'h02; b = 8'h80; end
        1: begin a = 8'hFF; b = 8'hFF; end
        2: begin a = 8'h00; b = 8'h5A; end
        3: begin a = 8'h01; b = 8'hC3; end
        default: begin a = 8'($urandom); b = 8'($urandom); end
      endcase
      in_valid = (c % 17) != 5;
      exp_p.push_back(gf_mul(a, b));
      exp_v.push_back(in_valid);
      #1;
      begin
        logic [7:0] e; bit ev;
        e  = exp_p.pop_front();
        ev = exp_v.pop_front();
        checks++;
        if (out_valid !== ev) begin
          failures++;
          $display("FAIL cycle %0d out_valid=%b expected %b", c, out_valid, ev);
        end
        if (ev) begin
          checks++;
          if (p !== e) begin
            failures++;
            $display("FAIL cycle %0d p=%02h expected %02h", c, p, e);
          end
        end
      end
      @(posedge clk); #1;
    end
    checks++;
    if (gf_mul(8'h02, 8'h80) != 8'h1D) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
