// tb_lut_layer: checks the default LUT pool against the merged pattern
// slices of the worked example, given as strings (leftmost = address 0),
// and a second, 32-bit-deep pool against its init value bit by bit.
module tb_lut_layer;
  int checks = 0, failures = 0;
  logic [2:0] addr;
  logic [3:0] bits;
  string pool [4] = '{"01111", "10000", "10111", "11001"};

  localparam logic [2:0][31:0] INIT32 = {32'hDEADBEEF, 32'h0F0F_3C3C, 32'h8000_0001};
  logic [4:0] addr32;
  logic [2:0] bits32;

  lut_layer dut (.addr_i(addr), .bits_o(bits));
  lut_layer #(.N_LUTS(3), .LUT_DEPTH(32), .LUT_INIT(INIT32)) dut32 (.addr_i(addr32), .bits_o(bits32));

  initial begin
    for (int a = 0; a < 5; a++) begin
      addr = 3'(a); #1;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (bits[l] != (pool[l][a] == "1")) begin
          failures++; $display("FAIL lut %0d addr %0d", l, a);
        end
      end
    end
    for (int a = 0; a < 32; a++) begin
      addr32 = 5'(a); #1;
      checks++;
      if (bits32 != {INIT32[2][a], INIT32[1][a], INIT32[0][a]}) begin
        failures++; $display("FAIL 32-bit addr %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
