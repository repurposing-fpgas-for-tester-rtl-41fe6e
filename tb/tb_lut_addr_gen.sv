// tb_lut_addr_gen: self-checking test of the LUT address generator.
// Runs a 5-bit (default) and a 32-bit counter with random enables and
// occasional clears, comparing address and last flag with a reference count.
module tb_lut_addr_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en, clr;
  logic [2:0] a5;  logic l5;
  logic [4:0] a32; logic l32;
  int ref5, ref32;

  lut_addr_gen dut5 (.clk, .rst, .en, .clr, .addr_o(a5), .last_o(l5));
  lut_addr_gen #(.LUT_DEPTH(32)) dut32 (.clk, .rst, .en, .clr, .addr_o(a32), .last_o(l32));

  initial begin
    en = 0; clr = 0; ref5 = 0; ref32 = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      checks++; if (a5 != 3'(ref5) || l5 != (ref5 == 4)) begin failures++; $display("FAIL 5: %0d vs %0d", a5, ref5); end
      checks++; if (a32 != 5'(ref32) || l32 != (ref32 == 31)) begin failures++; $display("FAIL 32: %0d vs %0d", a32, ref32); end
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 50) == 0;
      if (clr) begin ref5 = 0; ref32 = 0; end
      else if (en) begin ref5 = (ref5 + 1) % 5; ref32 = (ref32 + 1) % 32; end
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
