// memory_card: one 1k x 32 bit memory card of the buffer.
//
// A card holds 1k x 16 bit of side A and 1k x 16 bit of side B. A card
// answers to one 1k page of each side's 16-bit address: the low 10 bits
// pick the word, the bits above must equal the card's page number.
// For the side being written that page is the card's own slot number,
// CARD_NO (set by switches on the card), so the program-counters see one
// linear memory. For the side being read the page is the programmable
// `page` register, so several cards can answer the same correlator address
// and feed different data buses: with 4 blocks of 2k, cards 0/2/4/6 answer
// page 0 and cards 1/3/5/7 page 1. The card's `bus_en` switches say which of
// the 4 data buses it drives.
// Timing: a write happens on the clock edge where `we_x` is high; a read is
// registered, so `rdata` and `drive` belong to the correlator address of
// the previous cycle. `drive[k]` is high when the card was hit and drives
// data bus k. Reset sets page = CARD_NO and bus_en = bus 1 only, which is
// the simplest configuration (one block, one correlator).
// The card size, the split into sides, the page compare and the four
// bus switches are the source's; using the slot number for writes and the
// programmable page for reads, the reset values and the registered read are
// this design's choices.
module memory_card
  import buf_pkg::*;
#(
  parameter int unsigned WORDS   = CARD_WORDS,
  parameter int unsigned CARD_NO = 0
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               buffer_select,  // 1: A written, B read
  input  logic [ADDR_W-1:0]  addr_a,
  input  logic [ADDR_W-1:0]  addr_b,
  input  logic               we_a,
  input  logic               we_b,
  input  xy_word_t           wdata,
  input  logic               page_we,
  input  logic               busen_we,
  input  logic [PAGE_W-1:0]  page_data,
  input  logic [NUM_BUS-1:0] busen_data,
  output xy_word_t           rdata,
  output logic [NUM_BUS-1:0] drive,
  output logic [PAGE_W-1:0]  page,
  output logic [NUM_BUS-1:0] bus_en
);

  localparam int unsigned OFF = $clog2(WORDS);
  localparam int unsigned HW  = ADDR_W - OFF;

  xy_word_t mem_a [WORDS];
  xy_word_t mem_b [WORDS];
  xy_word_t rq_a, rq_b;
  logic     ce_a, ce_b, rd_hit, sel_q;

  // Programmable page and data-bus switches.
  always_ff @(posedge clk) begin
    if (rst) begin
      page   <= PAGE_W'(CARD_NO);
      bus_en <= NUM_BUS'(1);
    end else begin
      if (page_we)  page   <= page_data;
      if (busen_we) bus_en <= busen_data;
    end
  end

  // Chip enables: slot number when written, page register when read.
  always_comb begin
    ce_a = addr_a[ADDR_W-1:OFF] ==
           (buffer_select ? HW'(CARD_NO) : HW'(page));
    ce_b = addr_b[ADDR_W-1:OFF] ==
           (buffer_select ? HW'(page) : HW'(CARD_NO));
  end

  always_ff @(posedge clk) begin
    if (we_a && ce_a) mem_a[addr_a[OFF-1:0]] <= wdata;
    rq_a <= mem_a[addr_a[OFF-1:0]];
  end

  always_ff @(posedge clk) begin
    if (we_b && ce_b) mem_b[addr_b[OFF-1:0]] <= wdata;
    rq_b <= mem_b[addr_b[OFF-1:0]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_hit <= 1'b0;
      sel_q  <= 1'b1;
    end else begin
      rd_hit <= buffer_select ? ce_b : ce_a;
      sel_q  <= buffer_select;
    end
  end

  assign rdata = sel_q ? rq_b : rq_a;
  assign drive = rd_hit ? bus_en : '0;

endmodule
