// tb_data_bus_control: random card drive patterns; each bus must carry the
// word of the lowest-numbered card driving it, an undriven bus reads 0,
// the conflict flag marks two drivers on a bus, and the correlator enable
// turns every bus off.
module tb_data_bus_control;
  import buf_pkg::*;
  xy_word_t card_rdata [8];
  logic [3:0] card_drive [8];
  logic corr_enable, conflict;
  xy_word_t bus_data [4];
  logic [3:0] bus_drive;
  int checks = 0, failures = 0;

  data_bus_control dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic exp_conf;
      for (int c = 0; c < 8; c++) begin
        card_rdata[c] = 16'($urandom);
        card_drive[c] = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'b0;
      end
      corr_enable = ($urandom_range(0, 4) != 0);
      #1;
      exp_conf = 0;
      for (int k = 0; k < 4; k++) begin
        int first, n;
        first = -1; n = 0;
        for (int c = 0; c < 8; c++)
          if (card_drive[c][k]) begin n++; if (first < 0) first = c; end
        if (!corr_enable) begin first = -1; n = 0; end
        if (n > 1) exp_conf = 1;
        checks++;
        if (bus_drive[k] != (n > 0) || bus_data[k] != (n > 0 ? card_rdata[first] : 16'h0)) begin
          failures++; $display("FAIL bus %0d", k);
        end
      end
      checks++;
      if (conflict != exp_conf) begin failures++; $display("FAIL conflict"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
