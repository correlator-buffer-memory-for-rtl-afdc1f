// address_switch: the address transceivers 1A, 1B, 2A and 2B.
//
// Each memory side gets its address either from the internal address bus
// (the program-counters, for writing) or from the correlator (for reading).
// With `buffer_select` = 1 side A is written: 1A and 2B are enabled
// (E1A = E2B = 0) and 1B and 2A are off (E1B = E2A = 1); with 0 the roles
// swap. E1A is always the complement of E1B, and E2A follows E1B. The write
// pulse reaches only the side being written. Combinational; the enables are
// active low as in the source, and are brought out for display.
// Levels and pairing of the enables are the source's; multiplexers stand
// for the 3-state transceivers.
module address_switch
  import buf_pkg::*;
(
  input  logic              buffer_select,
  input  logic [ADDR_W-1:0] pc_addr,
  input  logic [ADDR_W-1:0] corr_addr,
  input  logic              write,
  output logic [ADDR_W-1:0] addr_a,
  output logic [ADDR_W-1:0] addr_b,
  output logic              we_a,
  output logic              we_b,
  output logic              e1a_n,
  output logic              e1b_n,
  output logic              e2a_n,
  output logic              e2b_n
);

  always_comb begin
    e1a_n  = !buffer_select;
    e1b_n  = !e1a_n;
    e2a_n  = e1b_n;
    e2b_n  = e1a_n;
    addr_a = !e1a_n ? pc_addr : corr_addr;
    addr_b = !e1b_n ? pc_addr : corr_addr;
    we_a   = write && !e1a_n;
    we_b   = write && !e1b_n;
  end

endmodule
