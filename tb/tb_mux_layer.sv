// tb_mux_layer: exhaustive check of the default chain multiplexers of the
// worked example. For every LUT output vector and every select value the
// chain bit must equal the LUT wired to that mux input
// (chain 1: LUTs 0,2,1; chain 2: LUTs 1,3,2; chain 3: LUTs 0,3).
module tb_mux_layer;
  int checks = 0, failures = 0;
  logic [3:0] lut;
  logic [2:0][1:0] sel;
  logic [2:0] chain;
  int wiring [3][3] = '{'{0, 2, 1}, '{1, 3, 2}, '{0, 3, 0}};

  mux_layer dut (.lut_bits_i(lut), .sel_i(sel), .chain_bits_o(chain));

  initial begin
    for (int v = 0; v < 16; v++)
      for (int s = 0; s < 64; s++) begin
        lut = 4'(v); sel = 6'(s); #1;
        for (int c = 0; c < 3; c++) begin
          automatic int k = int'(sel[c]);
          automatic int l = (k < 3) ? wiring[c][k] : wiring[c][0];
          checks++;
          if (chain[c] != lut[l]) begin
            failures++; $display("FAIL chain %0d sel %0d lut %b", c, k, lut);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
