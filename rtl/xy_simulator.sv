// xy_simulator: test-data generator for the buffer input ("test 2").
//
// Produces x/y words in which x counts up and y counts down, one step per
// accepted sample, so that a correlator fed from the buffer sees a known
// ramp at full input speed without the matched filter attached.
// `restart` (start-compute) puts x back to 0 and y back to all ones;
// `advance` steps both. Output is the register contents, so a new word
// appears one clock after `advance`.
// The up/down counting is the source's; start values, restart at
// start-compute and the 8-bit wrap are this design's choices.
module xy_simulator
  import buf_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     restart,
  input  logic     advance,
  output xy_word_t data
);

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      data.x <= '0;
      data.y <= '1;
    end else if (advance) begin
      data.x <= data.x + 1'b1;
      data.y <= data.y - 1'b1;
    end
  end

endmodule
