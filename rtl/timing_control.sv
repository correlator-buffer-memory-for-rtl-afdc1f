// timing_control: sequencing of the buffer's input side.
//
// Works from two events. Start-compute (from the radar controller or from
// CAMAC register 2) gives, on its rising edge, a one-cycle `reload` pulse
// that clears and reloads all program-counters, and swaps the two memory
// sides: `buffer_select` = 1 means side A is written and side B read.
// The data strobe of the matched filter runs a four-phase handshake:
//   IDLE      strobe seen: `sample_load` captures data and channel number
//   WRITE     `write`: the word goes into the memory at the selected
//             program-counter's address
//   ACK_CNT   `data_received` rises and, in the same cycle, `count` steps
//             the program-counter, so its next address is ready
//   ACK_WAIT  `data_received` held until the filter drops its strobe
// A sample therefore takes at least four clock cycles; the write is made on
// the clock edge after the one that first samples the strobe high. Outputs
// are decoded from the state register (sample_load also from the strobe).
// Signals are active high here; the source draws the strobe, data-received,
// write and counter clock as active-low pulses.
// The order of events is the source's (timing diagram of the input side);
// the clocked state machine, the cycle counts and the choice that either
// start-compute source is enough are this design's.
module timing_control (
  input  logic clk,
  input  logic rst,
  input  logic data_strobe,
  input  logic st_comp_radar,
  input  logic st_comp_camac,
  output logic sample_load,
  output logic write,
  output logic data_received,
  output logic count,
  output logic reload,
  output logic buffer_select
);

  typedef enum logic [1:0] {IDLE, WRITE, ACK_CNT, ACK_WAIT} state_t;
  state_t state, state_nx;

  logic st_comp, st_comp_q;

  assign st_comp = st_comp_radar || st_comp_camac;

  always_ff @(posedge clk) begin
    if (rst) begin
      st_comp_q     <= 1'b0;
      reload        <= 1'b0;
      buffer_select <= 1'b1;
    end else begin
      st_comp_q <= st_comp;
      reload    <= st_comp && !st_comp_q;
      if (st_comp && !st_comp_q) buffer_select <= !buffer_select;
    end
  end

  always_comb begin
    state_nx = state;
    unique case (state)
      IDLE:     if (data_strobe) state_nx = WRITE;
      WRITE:    state_nx = ACK_CNT;
      ACK_CNT:  state_nx = ACK_WAIT;
      ACK_WAIT: if (!data_strobe) state_nx = IDLE;
      default:  state_nx = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= IDLE;
    else     state <= state_nx;
  end

  assign sample_load   = (state == IDLE) && data_strobe;
  assign write         = (state == WRITE);
  assign count         = (state == ACK_CNT);
  assign data_received = (state == ACK_CNT) || (state == ACK_WAIT);

endmodule
