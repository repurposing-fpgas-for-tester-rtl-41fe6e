// tb_ram_addr_gen: self-checking test of the RAM address generator with the
// default size (4 patterns, one segment each) and with 5 patterns of 3
// segments, under random enables and occasional clears. Address, last
// segment and last pattern flags are compared with a reference count.
module tb_ram_addr_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en, clr;
  logic [1:0] a4;  logic s4, p4;
  logic [3:0] a15; logic s15, p15;
  int r4, r15;

  ram_addr_gen dut4 (.clk, .rst, .en, .clr, .addr_o(a4), .seg_last_o(s4), .pat_last_o(p4));
  ram_addr_gen #(.N_PATTERNS(5), .N_SEGS(3)) dut15 (.clk, .rst, .en, .clr, .addr_o(a15),
                                                     .seg_last_o(s15), .pat_last_o(p15));

  initial begin
    en = 0; clr = 0; r4 = 0; r15 = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      checks++;
      if (a4 != 2'(r4) || !s4 || p4 != (r4 == 3)) begin failures++; $display("FAIL 4: %0d vs %0d", a4, r4); end
      checks++;
      if (a15 != 4'(r15) || s15 != (r15 % 3 == 2) || p15 != (r15 / 3 == 4)) begin
        failures++; $display("FAIL 15: %0d vs %0d", a15, r15);
      end
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 50) == 0;
      if (clr) begin r4 = 0; r15 = 0; end
      else if (en) begin r4 = (r4 + 1) % 4; r15 = (r15 + 1) % 15; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
