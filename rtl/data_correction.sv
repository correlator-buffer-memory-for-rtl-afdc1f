// data_correction: removes the value -128 from an 8-bit sample.
//
// The correlator cannot take the two's-complement value -128, so a sample
// equal to -128 is replaced by -128 + 1 = -127; every other value passes
// unchanged. The buffer uses one instance for the x sample and one for the
// y sample of each word, between the input multiplexer and the memory.
// Purely combinational; `corrected` flags that the value was changed.
// The rule is the source's; the flag output is this design's addition,
// used for counting corrections in simulation.
module data_correction #(
  parameter int unsigned W = buf_pkg::SAMPLE_W
) (
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic         corrected
);

  localparam logic [W-1:0] MOST_NEG = {1'b1, {(W-1){1'b0}}};

  always_comb begin
    corrected = (din == MOST_NEG);
    dout      = corrected ? din + W'(1) : din;
  end

endmodule
