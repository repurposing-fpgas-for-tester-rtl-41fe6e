// tb_misr: checks the signature register against a stage-by-stage
// reference model (stage 1 = XNOR of the taps, stage i = stage i-1, input k
// XORed into stage k+1) for the default 8-bit register (taps 8,6,5,4) and an
// 11-bit, 6-input register with taps 9,11. With zero input the 11-bit
// register must run through all 2^11-1 non-lock-up states before repeating.
module tb_misr;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en;
  logic [2:0] d3;  logic [7:0]  s8;
  logic [5:0] d6;  logic [10:0] s11;
  logic [7:0]  m8;
  logic [10:0] m11;
  int taps8 [4] = '{8, 6, 5, 4};
  int taps11 [2] = '{9, 11};

  misr dut8 (.clk, .rst, .en_i(en), .d_i(d3), .sig_o(s8));
  misr #(.N_IN(6), .MISR_LEN(11), .TAPS(11'b101_0000_0000)) dut11 (.clk, .rst, .en_i(en), .d_i(d6), .sig_o(s11));

  function automatic logic [7:0] step8(logic [7:0] q, logic [2:0] d);
    logic fb = 1'b1;
    logic [7:0] n;
    foreach (taps8[i]) fb = fb ^ q[taps8[i]-1];  // XNOR chain
    n[0] = fb;
    for (int i = 2; i <= 8; i++) n[i-1] = q[i-2];
    for (int k = 0; k < 3; k++) n[k] = n[k] ^ d[k];
    return n;
  endfunction

  function automatic logic [10:0] step11(logic [10:0] q, logic [5:0] d);
    logic fb = 1'b1;
    logic [10:0] n;
    foreach (taps11[i]) fb = fb ^ q[taps11[i]-1];
    n[0] = fb;
    for (int i = 2; i <= 11; i++) n[i-1] = q[i-2];
    for (int k = 0; k < 6; k++) n[k] = n[k] ^ d[k];
    return n;
  endfunction

  initial begin
    en = 0; d3 = 0; d6 = 0; m8 = 0; m11 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 500; i++) begin
      en = ($urandom % 4) != 0; d3 = 3'($urandom); d6 = 6'($urandom);
      if (en) begin m8 = step8(m8, d3); m11 = step11(m11, d6); end
      @(negedge clk);
      checks++; if (s8 != m8) begin failures++; $display("FAIL 8: %h vs %h", s8, m8); end
      checks++; if (s11 != m11) begin failures++; $display("FAIL 11: %h vs %h", s11, m11); end
    end
    // period with zero input
    begin
      automatic logic [10:0] start;
      automatic int period = 0;
      en = 1; d6 = 0; d3 = 0;
      @(negedge clk);
      start = s11;
      do begin @(negedge clk); period++; end while (s11 != start && period < 5000);
      checks++;
      if (period != 2047) begin failures++; $display("FAIL period %0d", period); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
