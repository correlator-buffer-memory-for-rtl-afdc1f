// channel_decoder: 3-bit channel register, 1-of-8 decode and gating.
//
// A channel number is clocked into a 3-bit register when `load` is high.
// The register is decoded to one of eight lines and each line is gated with
// `gate`, so exactly one of `sel[7:0]` pulses while `gate` is high: line 0
// for channel number 0 (channel 1) up to line 7 for number 7 (channel 8).
// The buffer uses one instance to step the program-counters (gate = the
// counter clock made with data-received) and one to make the programming
// clocks ACK1..ACK8 (gate = ENDATA). `ch_q` is the register, for display.
// The function tables are the source's; there the outputs are active-low
// pulses, here they are active-high one-cycle enables of a synchronous
// design. `sel` is driven from the register, so a number loaded in one
// cycle is decoded from the next cycle on.
module channel_decoder
  import buf_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic [CH_W-1:0]   ch_in,
  input  logic              gate,
  output logic [CH_W-1:0]   ch_q,
  output logic [NUM_PC-1:0] sel
);

  always_ff @(posedge clk) begin
    if (rst)       ch_q <= '0;
    else if (load) ch_q <= ch_in;
  end

  always_comb begin
    sel = '0;
    sel[ch_q] = gate;
  end

endmodule
