// data_bus_control: puts the memory cards' read data on the 4 data buses.
//
// Every card reports its read word and, per bus, whether it drives that bus
// (its page was hit and its bus switch for that bus is on). For each bus
// the word of the driving card is passed on and `bus_drive` is set, which
// stands for the enabled 3-state line drivers; an undriven bus reads 0.
// The correlator's enable input switches all four buses off at once, so
// the correlator can take data from elsewhere. If two cards drive one bus
// (a setup error) the lower-numbered card wins and `conflict` is set.
// Combinational. Bus enables and the common correlator enable are the
// source's; priority and the conflict flag are this design's.
module data_bus_control
  import buf_pkg::*;
#(
  parameter int unsigned CARDS = NUM_CARDS
) (
  input  xy_word_t           card_rdata [CARDS],
  input  logic [NUM_BUS-1:0] card_drive [CARDS],
  input  logic               corr_enable,
  output xy_word_t           bus_data   [NUM_BUS],
  output logic [NUM_BUS-1:0] bus_drive,
  output logic               conflict
);

  always_comb begin
    conflict  = 1'b0;
    bus_drive = '0;
    for (int k = 0; k < NUM_BUS; k++) begin
      bus_data[k] = '0;
      for (int c = CARDS - 1; c >= 0; c--) begin
        if (card_drive[c][k] && corr_enable) begin
          if (bus_drive[k]) conflict = 1'b1;
          bus_data[k]  = card_rdata[c];
          bus_drive[k] = 1'b1;
        end
      end
    end
  end

endmodule
