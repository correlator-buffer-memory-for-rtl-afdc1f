// tb_test_prom: reads the PROM sequentially beyond its end and compares
// every word with the generating formula; checks wrap-around and restart.
module tb_test_prom;
  import buf_pkg::*;
  logic clk = 0, rst, restart, advance;
  xy_word_t data;
  int checks = 0, failures = 0;

  test_prom dut (.clk, .rst, .restart, .advance, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(int i);
    int k;
    k = i % 512;
    checks++;
    if (data.x != 8'((37 * k + 5) % 256) || data.y != 8'((101 * k + 11) % 256)) begin
      failures++;
      $display("FAIL word %0d: x=%0d y=%0d", i, data.x, data.y);
    end
  endtask

  initial begin
    rst = 1; restart = 0; advance = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 1100; i++) begin
      #1 check_word(i);
      @(negedge clk) advance = 1;
      @(posedge clk);
      @(negedge clk) advance = 0;
    end
    // restart in the middle
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    check_word(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
