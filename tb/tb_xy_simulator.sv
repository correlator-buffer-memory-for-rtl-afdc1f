// tb_xy_simulator: x must count up and y down, one step per advance,
// and restart must return to x = 0, y = 255.
module tb_xy_simulator;
  import buf_pkg::*;
  logic clk = 0, rst, restart, advance;
  xy_word_t data;
  int checks = 0, failures = 0;
  int steps;

  xy_simulator dut (.clk, .rst, .restart, .advance, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state(int n);
    checks++;
    if (data.x != 8'(n) || data.y != 8'(255 - n)) begin
      failures++;
      $display("FAIL step %0d: x=%0d y=%0d", n, data.x, data.y);
    end
  endtask

  initial begin
    rst = 1; restart = 0; advance = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    steps = 0;
    check_state(0);
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      advance = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
      if (advance) steps++;
      check_state(steps);
    end
    @(negedge clk) begin advance = 0; restart = 1; end
    @(posedge clk); #1;
    check_state(0);
    @(negedge clk) restart = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
