// tb_sig_cmp: golden-signature comparison. A matching signature must pass,
// any single-bit difference must fail, and the result must hold after
// check_i until reset.
module tb_sig_cmp;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam logic [10:0] G = 11'h5A3;
  logic check;
  logic [10:0] sig;
  logic done, pass;

  sig_cmp #(.W(11), .GOLDEN(G)) dut (.clk, .rst, .check_i(check), .sig_i(sig), .done_o(done), .pass_o(pass));

  task automatic run(input logic [10:0] s, input logic exp);
    rst = 1; check = 0; sig = s;
    @(negedge clk); rst = 0;
    @(negedge clk);
    checks++; if (done) begin failures++; $display("FAIL early done"); end
    check = 1;
    @(negedge clk); check = 0;
    checks++; if (!done || pass != exp) begin failures++; $display("FAIL sig %h pass %b", s, pass); end
    sig = ~s;
    repeat (3) @(negedge clk);
    checks++; if (!done || pass != exp) begin failures++; $display("FAIL hold"); end
  endtask

  initial begin
    check = 0; sig = 0;
    run(G, 1'b1);
    for (int b = 0; b < 11; b++) run(G ^ (11'd1 << b), 1'b0);
    run(~G, 1'b0);
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
