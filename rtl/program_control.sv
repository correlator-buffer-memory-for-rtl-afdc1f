// program_control: CAMAC programming of the buffer.
//
// The computer writes two CAMAC registers: register 1 carries an address or
// data word (`camac_ad`), register 2 (`camac_ctl`) carries the control bits:
//   bit 0  low: enable address- or data-load     bit 7  test 1 enable
//   bit 1  low: load address                     bit 8  test 2 enable
//   bit 2  low: load data                        bit 9  PENABLE (paging)
//   bit 6  start-compute                         bit 10 DENABLE (data buses)
//                                                bit 11 display data
// A programming step has two phases. Address phase: bits 0 and 1 low. On
// its first cycle (CL.BUF NO) the buffer latches whether register 1 names
// it (ident code in [15:8] equal to BUFFER_ID) and the item number in [3:0]
// (program-counter 0..7, or memory card). Data phase: bits 0 and 2 low. On
// its first cycle (ENDATA) a buffer that was named writes register 1 into
// the item:
//   PENABLE and DENABLE both 0: start address of program-counter item[2:0]
//     (one of the clocks ACK1..ACK8 pulses, through a channel_decoder);
//   PENABLE 1: page of card `item` = data[3:0];
//   DENABLE 1: data-bus enables of card `item` = data[7:4].
// All outputs are one-cycle pulses or levels decoded straight from the
// register bits; camac_ctl is taken as synchronous to clk.
// The register-2 bit meanings and the address-then-data sequence are the
// source's; the field layout of register 1 and the use of PENABLE/DENABLE
// to steer the data word are this design's choices.
module program_control
  import buf_pkg::*;
#(
  parameter logic [ID_W-1:0] BUFFER_ID = 8'd2,
  parameter int unsigned     CARDS     = NUM_CARDS
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [15:0]       camac_ad,
  input  logic [15:0]       camac_ctl,
  // program-counters
  output logic [NUM_PC-1:0] pc_load,      // ACK1..ACK8
  output logic [15:0]       prog_data,
  // memory cards
  output logic [CARDS-1:0]  page_we,
  output logic [CARDS-1:0]  busen_we,
  output logic [PAGE_W-1:0] page_data,
  output logic [NUM_BUS-1:0] busen_data,
  // levels from register 2
  output logic              st_comp,
  output logic              test1_en,
  output logic              test2_en,
  output logic              display,
  // status
  output logic              selected,
  output logic              cl_buf_no,
  output logic              endata
);

  logic addr_phase, data_phase, addr_phase_q, data_phase_q;
  logic [3:0] item;
  logic       prog, to_cards;

  assign addr_phase = !camac_ctl[R2_ENABLE_N] && !camac_ctl[R2_LOAD_ADDR_N];
  assign data_phase = !camac_ctl[R2_ENABLE_N] && !camac_ctl[R2_LOAD_DATA_N];

  always_ff @(posedge clk) begin
    if (rst) begin
      addr_phase_q <= 1'b0;
      data_phase_q <= 1'b0;
    end else begin
      addr_phase_q <= addr_phase;
      data_phase_q <= data_phase;
    end
  end

  assign cl_buf_no = addr_phase && !addr_phase_q;
  assign endata    = data_phase && !data_phase_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      selected <= 1'b0;
      item     <= '0;
    end else if (cl_buf_no) begin
      selected <= (camac_ad[AD_ID_LSB +: ID_W] == BUFFER_ID);
      item     <= camac_ad[AD_ITEM_LSB +: 4];
    end
  end

  assign prog     = endata && selected;
  assign to_cards = camac_ctl[R2_PENABLE] || camac_ctl[R2_DENABLE];

  // Program-counter number register and ACK1..ACK8 decode.
  channel_decoder u_ack_dec (
    .clk   (clk),
    .rst   (rst),
    .load  (cl_buf_no),
    .ch_in (camac_ad[AD_ITEM_LSB +: CH_W]),
    .gate  (prog && !to_cards),
    .ch_q  (),
    .sel   (pc_load)
  );

  always_comb begin
    page_we  = '0;
    busen_we = '0;
    for (int c = 0; c < CARDS; c++) begin
      if (prog && item == 4'(c)) begin
        page_we[c]  = camac_ctl[R2_PENABLE];
        busen_we[c] = camac_ctl[R2_DENABLE];
      end
    end
  end

  assign prog_data  = camac_ad;
  assign page_data  = camac_ad[PD_PAGE_LSB +: PAGE_W];
  assign busen_data = camac_ad[PD_BUSEN_LSB +: NUM_BUS];

  assign st_comp  = camac_ctl[R2_ST_COMP];
  assign test1_en = camac_ctl[R2_TEST1];
  assign test2_en = camac_ctl[R2_TEST2];
  assign display  = camac_ctl[R2_DISPLAY];

endmodule
