// test_prom: internal 512 x 16 bit test-data store ("test 1").
//
// Holds x/y test words that are read out one after the other, one word per
// accepted sample, so buffer and correlator can be exercised at full speed.
// A 9-bit address counter points at the current word; `restart`
// (start-compute) sets it to 0 and `advance` steps it, wrapping after the
// last word. The read is asynchronous, as from a PROM: `data` follows the
// counter in the same cycle.
// Size and purpose are the source's; the contents are not given there, so
// this design fills the store with x = (37*i + 5) mod 256 and
// y = (101*i + 11) mod 256 for word i. Both sequences visit every 8-bit
// value, so the -128 correction is exercised too.
module test_prom
  import buf_pkg::*;
#(
  parameter int unsigned WORDS = PROM_WORDS
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     restart,
  input  logic     advance,
  output xy_word_t data
);

  localparam int unsigned AW = $clog2(WORDS);

  xy_word_t       rom [WORDS];
  logic [AW-1:0]  addr;

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      rom[i].x = 8'((37 * i + 5) % 256);
      rom[i].y = 8'((101 * i + 11) % 256);
    end
  end

  always_ff @(posedge clk) begin
    if (rst || restart)  addr <= '0;
    else if (advance)    addr <= (addr == AW'(WORDS - 1)) ? '0 : addr + 1'b1;
  end

  assign data = rom[addr];

endmodule
