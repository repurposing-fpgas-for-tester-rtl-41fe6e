// tb_sel_ram: checks the default select-line RAM contents (the worked
// example's select values per chain) and its one-clock read latency.
module tb_sel_ram;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] addr;
  logic [2:0][1:0] sel;
  // select values per chain over patterns 1..4
  int exp_sel [3][4] = '{'{0, 1, 2, 0}, '{0, 1, 1, 2}, '{0, 1, 1, 1}};

  sel_ram dut (.clk, .rst, .addr_i(addr), .sel_o(sel));

  initial begin
    addr = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 40; i++) begin
      automatic int a = $urandom % 4;
      addr = 2'(a);
      @(negedge clk);  // one clock later the entry must be visible
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (32'(sel[c]) != exp_sel[c][a]) begin
          failures++; $display("FAIL pattern %0d chain %0d: %0d", a, c, sel[c]);
        end
      end
      // latency: changing the address must not change the output before the edge
      addr = 2'((a + 1) % 4); #1;
      checks++;
      if (32'(sel[0]) != exp_sel[0][a]) begin failures++; $display("FAIL latency"); end
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
