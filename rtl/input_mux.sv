// input_mux: chooses where the buffer's input samples come from.
//
// Two multiplexers in series: the first picks between the two internal test
// sources (internal PROM when test 1 is enabled, else the x/y simulator),
// the second between that and the matched-filter data bus. Test 1 wins when
// both test enables are set. Channel number and data strobe always come from
// the filter side, so a test run still needs a strobe and channel number at
// the filter port. Combinational; `src` reports the chosen source.
// The two multiplexers and their inputs are the source's; the priority and
// keeping strobe/channel from the filter port are this design's choices.
module input_mux
  import buf_pkg::*;
(
  input  xy_word_t filt_data,
  input  xy_word_t prom_data,
  input  xy_word_t sim_data,
  input  logic     test1_en,
  input  logic     test2_en,
  output xy_word_t data,
  output src_t     src
);

  xy_word_t test_data;

  always_comb begin
    test_data = test1_en ? prom_data : sim_data;
    if (test1_en)      src = SRC_PROM;
    else if (test2_en) src = SRC_SIM;
    else               src = SRC_FILTER;
    data = (test1_en || test2_en) ? test_data : filt_data;
  end

endmodule
