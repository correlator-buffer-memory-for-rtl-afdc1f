// tb_channel_decoder: checks the function table of the channel decoder:
// channel number n (0..7) gives a pulse on line n only while the gate is
// high, and the number is held until the next load.
module tb_channel_decoder;
  import buf_pkg::*;
  logic clk = 0, rst, load, gate;
  logic [2:0] ch_in, ch_q;
  logic [7:0] sel;
  logic [2:0] model;
  int checks = 0, failures = 0;

  channel_decoder dut (.clk, .rst, .load, .ch_in, .gate, .ch_q, .sel);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; gate = 0; ch_in = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    model = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      load  = $urandom_range(0, 1);
      ch_in = 3'($urandom);
      gate  = $urandom_range(0, 1);
      #1;
      checks++;
      if (sel != (gate ? 8'(1) << model : 8'h00) || ch_q != model) begin
        failures++;
        $display("FAIL model=%0d gate=%b sel=%b", model, gate, sel);
      end
      @(posedge clk);
      if (load) model = ch_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
