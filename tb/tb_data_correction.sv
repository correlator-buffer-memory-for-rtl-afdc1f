// tb_data_correction: exhaustive check of the -128 correction.
// Drives all 256 8-bit values and compares with an independent rule:
// the result as a signed number is max(value, -127).
module tb_data_correction;
  logic [7:0] din, dout;
  logic       corrected;
  int checks = 0, failures = 0;

  data_correction dut (.din, .dout, .corrected);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      int exp_v;
      din = 8'(v);
      #1;
      exp_v = (v < -127) ? -127 : v;
      checks++;
      if ($signed(dout) != exp_v || corrected != (v == -128)) begin
        failures++;
        $display("FAIL din=%0d dout=%0d corrected=%b", v, $signed(dout), corrected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
