// tb_scan_reg: random loads and holds of the scan-data register.
module tb_scan_reg;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic load;
  logic [5:0] d, q, model;

  scan_reg #(.N_CHAINS(6)) dut (.clk, .rst, .load_i(load), .d_i(d), .q_o(q));

  initial begin
    load = 0; d = '1; model = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    checks++; if (q != 0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 200; i++) begin
      load = $urandom % 2; d = 6'($urandom);
      if (load) model = d;
      @(negedge clk);
      checks++;
      if (q != model) begin failures++; $display("FAIL %b vs %b", q, model); end
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
