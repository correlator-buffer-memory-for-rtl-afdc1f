// tb_input_mux: random words on the three sources under all four test
// enable combinations; test 1 has priority over test 2.
module tb_input_mux;
  import buf_pkg::*;
  xy_word_t filt_data, prom_data, sim_data, data;
  logic test1_en, test2_en;
  src_t src;
  int checks = 0, failures = 0;

  input_mux dut (.filt_data, .prom_data, .sim_data, .test1_en, .test2_en, .data, .src);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      xy_word_t exp_d;
      src_t exp_s;
      filt_data = 16'($urandom); prom_data = 16'($urandom); sim_data = 16'($urandom);
      {test1_en, test2_en} = 2'(i);
      #1;
      if (test1_en)      begin exp_d = prom_data; exp_s = SRC_PROM;   end
      else if (test2_en) begin exp_d = sim_data;  exp_s = SRC_SIM;    end
      else               begin exp_d = filt_data; exp_s = SRC_FILTER; end
      checks++;
      if (data != exp_d || src != exp_s) begin
        failures++;
        $display("FAIL t1=%b t2=%b data=%h src=%0d", test1_en, test2_en, data, src);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
