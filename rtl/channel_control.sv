// channel_control: one program-counter of the buffer's write addressing.
//
// Holds a 16-bit programmable start-address register and a 16-bit counter.
// `prog_load` (the channel's programming clock, ACKn) loads `prog_data` into
// the start register. `reload` (the clear-and-reload pulse made at every
// start-compute) copies the start register into the counter, and `count`
// (the channel's counter clock, made when its sample has been written) steps
// the counter by one, wrapping at 16 bits. Reload wins over count.
// `addr_out` is the counter, qualified by `oe`; the owner of the internal
// address bus ORs the qualified outputs of all eight channels, which stands
// for the 3-state bus transceivers of the source. Counter and register
// change on the clock edge after their enable.
// Register, counter and transceiver are the source's; reset to zero is this
// design's choice.
module channel_control
  import buf_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          prog_load,
  input  logic [AW-1:0] prog_data,
  input  logic          reload,
  input  logic          count,
  input  logic          oe,
  output logic [AW-1:0] start_addr,
  output logic [AW-1:0] counter,
  output logic [AW-1:0] addr_out
);

  always_ff @(posedge clk) begin
    if (rst)            start_addr <= '0;
    else if (prog_load) start_addr <= prog_data;
  end

  always_ff @(posedge clk) begin
    if (rst)         counter <= '0;
    else if (reload) counter <= start_addr;
    else if (count)  counter <= counter + 1'b1;
  end

  assign addr_out = oe ? counter : '0;

endmodule
