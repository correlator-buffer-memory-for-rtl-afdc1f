// tb_channel_control: programs start addresses, reloads and counts at
// random and compares with a reference model: reload copies the start
// register, count adds one modulo 2^16, reload wins over count, and the
// bus output is zero when not enabled.
module tb_channel_control;
  logic clk = 0, rst, prog_load, reload, count, oe;
  logic [15:0] prog_data, start_addr, counter, addr_out;
  logic [15:0] m_start, m_cnt;
  int checks = 0, failures = 0;

  channel_control dut (.clk, .rst, .prog_load, .prog_data, .reload, .count, .oe,
                       .start_addr, .counter, .addr_out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; prog_load = 0; reload = 0; count = 0; oe = 0; prog_data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    m_start = 0; m_cnt = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      prog_load = ($urandom_range(0, 15) == 0);
      prog_data = (i < 1000) ? 16'($urandom) : 16'hFFF0 + 16'($urandom_range(0, 15));
      reload    = ($urandom_range(0, 20) == 0);
      count     = ($urandom_range(0, 1) == 1);
      oe        = $urandom_range(0, 1);
      #1;
      checks++;
      if (counter != m_cnt || start_addr != m_start || addr_out != (oe ? m_cnt : 16'h0)) begin
        failures++;
        $display("FAIL i=%0d cnt=%h exp=%h start=%h exp=%h", i, counter, m_cnt, start_addr, m_start);
      end
      @(posedge clk);
      if (reload)     m_cnt = m_start;
      else if (count) m_cnt = m_cnt + 16'd1;
      if (prog_load)  m_start = prog_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
