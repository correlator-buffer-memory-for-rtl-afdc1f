// buf_pkg: sizes, field positions and shared types of the correlator
// buffer-memory.
//
// The buffer holds two identical sides (A and B). While the matched filter
// writes one side through eight programmable program-counters, the
// correlator reads the other side onto four 16-bit data buses. The sides
// swap at every start-compute. Memory is built from 1k-word cards, each
// holding 1k x 16 bit of side A and 1k x 16 bit of side B.
//
// Numbers taken from the source description: 8 program-counters of 16 bit,
// 16-bit x/y words (8 bit x, 8 bit y), 4 output data buses, 1k-word pages,
// 8 cards (32 bit x 8k in all), a 512-word test PROM, a 4-bit page
// comparator and the bit positions of CAMAC register 2.
// Own choices: x in the upper byte of a word, the field layout of the CAMAC
// address word, and the layout of the page / bus-enable data word.
package buf_pkg;

  localparam int unsigned NUM_PC     = 8;     // program-counters / channels
  localparam int unsigned CH_W       = 3;     // channel-number bus width
  localparam int unsigned ADDR_W     = 16;    // program-counter width
  localparam int unsigned WORD_W     = 16;    // x/y word
  localparam int unsigned SAMPLE_W   = 8;     // one of x or y
  localparam int unsigned NUM_BUS    = 4;     // output data buses
  localparam int unsigned CARD_WORDS = 1024;  // one page = one card
  localparam int unsigned NUM_CARDS  = 8;     // 8k words per side
  localparam int unsigned PAGE_W     = 4;     // width of the page comparator
  localparam int unsigned PROM_WORDS = 512;   // internal test PROM
  localparam int unsigned ID_W       = 8;     // module ident code field

  // One sample word: x in the upper byte, y in the lower byte.
  typedef struct packed {
    logic [SAMPLE_W-1:0] x;
    logic [SAMPLE_W-1:0] y;
  } xy_word_t;

  // Bit positions in CAMAC register 2 (control register).
  localparam int unsigned R2_ENABLE_N    = 0;   // low: enable address- or data-load
  localparam int unsigned R2_LOAD_ADDR_N = 1;   // low: load address
  localparam int unsigned R2_LOAD_DATA_N = 2;   // low: load data
  localparam int unsigned R2_ST_COMP     = 6;   // start-compute
  localparam int unsigned R2_TEST1       = 7;   // test 1 enable (internal PROM)
  localparam int unsigned R2_TEST2       = 8;   // test 2 enable (x/y simulator)
  localparam int unsigned R2_PENABLE     = 9;   // paging enable
  localparam int unsigned R2_DENABLE     = 10;  // data-bus enable
  localparam int unsigned R2_DISPLAY     = 11;  // display data

  // Fields of the CAMAC address word (register 1 during the address phase).
  localparam int unsigned AD_ITEM_LSB = 0;   // [3:0]  program-counter (0..7) or card number
  localparam int unsigned AD_ID_LSB   = 8;   // [15:8] ident code of the addressed buffer

  // Fields of the data word when paging / bus enables are programmed.
  localparam int unsigned PD_PAGE_LSB  = 0;  // [3:0] page the card answers to when read
  localparam int unsigned PD_BUSEN_LSB = 4;  // [7:4] data buses the card drives

  // Sample source at the buffer input.
  typedef enum logic [1:0] {
    SRC_FILTER = 2'd0,
    SRC_PROM   = 2'd1,
    SRC_SIM    = 2'd2
  } src_t;

endpackage
