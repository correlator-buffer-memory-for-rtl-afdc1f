// buffer_memory: double-buffered input memory of a radar correlator.
//
// Samples from the matched filter (16-bit x/y word plus a 3-bit channel
// number) are written into one side of the memory while the correlator
// reads the other side; every start-compute swaps the sides, so loading and
// reading never wait for each other. Each of the 8 channels has its own
// program-counter: a start address programmed once over CAMAC, reloaded at
// every start-compute and stepped after each sample of its channel, which
// lets the channels fill separate areas of the memory. On the read side the
// memory is built from 1k-word cards; each card can be told which page of
// the correlator address it answers and which of the 4 data buses it
// drives, so one correlator address can fetch up to 4 words from 4 blocks
// at once (one correlator and three slaves).
//
// Data path: filter / test PROM / x-y simulator -> input_mux -> x and y
// data_correction (-128 becomes -127) -> input register -> memory cards.
// Address path: channel register (channel_decoder) selects one of the 8
// channel_control program-counters onto the internal address bus; the
// address_switch gives that bus to the written side and the correlator
// address to the read side. timing_control sequences the filter handshake
// (at least 4 clocks per sample; the write is made one clock after the
// strobe is first sampled)
// and start-compute; program_control decodes the CAMAC registers.
//
// Timing: one clock, synchronous active-high reset, all inputs taken as
// synchronous. Correlator read data and bus_drive appear one clock after
// corr_addr; there is no handshake towards the correlator.
// Ports: see the port list; bus_drive[k] stands for the enabled 3-state
// drivers of data bus k. The front-panel outputs show both address buses,
// the channel register and either the last word written (display bit set)
// or data bus 1.
// The structure follows the source; the single clock, the handshake cycle
// counts and the CAMAC word layouts are this design's choices.
module buffer_memory
  import buf_pkg::*;
#(
  parameter int unsigned     NUM_CARDS_P = NUM_CARDS,
  parameter logic [ID_W-1:0] BUFFER_ID   = 8'd2
) (
  input  logic               clk,
  input  logic               rst,
  // matched filter
  input  xy_word_t           filt_data,
  input  logic [CH_W-1:0]    filt_ch,
  input  logic               filt_strobe,
  output logic               filt_data_received,
  // radar controller
  input  logic               radar_st_comp,
  // CAMAC registers 1 and 2
  input  logic [15:0]        camac_ad,
  input  logic [15:0]        camac_ctl,
  // correlator
  input  logic [ADDR_W-1:0]  corr_addr,
  input  logic               corr_enable,
  output xy_word_t           bus_data [NUM_BUS],
  output logic [NUM_BUS-1:0] bus_drive,
  output logic               bus_conflict,
  // status / front panel
  output logic               buffer_select,
  output logic               e1a_n,
  output logic               e1b_n,
  output logic               e2a_n,
  output logic               e2b_n,
  output logic [ADDR_W-1:0]  panel_addr_a,
  output logic [ADDR_W-1:0]  panel_addr_b,
  output logic [CH_W-1:0]    panel_ch,
  output xy_word_t           panel_data
);

  // ---------------- CAMAC programming ----------------
  logic [NUM_PC-1:0]      pc_load;
  logic [15:0]            prog_data;
  logic [NUM_CARDS_P-1:0] page_we, busen_we;
  logic [PAGE_W-1:0]      page_data;
  logic [NUM_BUS-1:0]     busen_data;
  logic                   st_comp_camac, test1_en, test2_en, display;

  program_control #(.BUFFER_ID(BUFFER_ID), .CARDS(NUM_CARDS_P)) u_prog (
    .clk, .rst, .camac_ad, .camac_ctl,
    .pc_load, .prog_data, .page_we, .busen_we, .page_data, .busen_data,
    .st_comp (st_comp_camac), .test1_en, .test2_en, .display,
    .selected (), .cl_buf_no (), .endata ()
  );

  // ---------------- timing ----------------
  logic sample_load, write, count, reload;

  timing_control u_timing (
    .clk, .rst,
    .data_strobe   (filt_strobe),
    .st_comp_radar (radar_st_comp),
    .st_comp_camac (st_comp_camac),
    .sample_load, .write,
    .data_received (filt_data_received),
    .count, .reload, .buffer_select
  );

  // ---------------- input data path ----------------
  xy_word_t prom_data, sim_data, mux_data, corr_word, in_word;
  src_t     src;

  test_prom u_prom (
    .clk, .rst, .restart (reload),
    .advance (sample_load && src == SRC_PROM),
    .data    (prom_data)
  );

  xy_simulator u_sim (
    .clk, .rst, .restart (reload),
    .advance (sample_load && src == SRC_SIM),
    .data    (sim_data)
  );

  input_mux u_mux (
    .filt_data, .prom_data, .sim_data, .test1_en, .test2_en,
    .data (mux_data), .src
  );

  data_correction u_corr_x (.din (mux_data.x), .dout (corr_word.x), .corrected ());
  data_correction u_corr_y (.din (mux_data.y), .dout (corr_word.y), .corrected ());

  always_ff @(posedge clk) begin
    if (rst)              in_word <= '0;
    else if (sample_load) in_word <= corr_word;
  end

  // ---------------- program-counters ----------------
  logic [CH_W-1:0]   ch_q;
  logic [NUM_PC-1:0] pc_count;
  logic [ADDR_W-1:0] pc_out [NUM_PC];
  logic [ADDR_W-1:0] int_addr;

  channel_decoder u_ch (
    .clk, .rst, .load (sample_load), .ch_in (filt_ch), .gate (count),
    .ch_q, .sel (pc_count)
  );

  for (genvar i = 0; i < NUM_PC; i++) begin : g_pc
    channel_control u_pc (
      .clk, .rst,
      .prog_load  (pc_load[i]),
      .prog_data  (prog_data),
      .reload     (reload),
      .count      (pc_count[i]),
      .oe         (ch_q == CH_W'(i)),
      .start_addr (),
      .counter    (),
      .addr_out   (pc_out[i])
    );
  end

  // Internal address bus: only the selected channel drives it.
  always_comb begin
    int_addr = '0;
    for (int i = 0; i < NUM_PC; i++) int_addr |= pc_out[i];
  end

  // ---------------- address transceivers ----------------
  logic [ADDR_W-1:0] addr_a, addr_b;
  logic              we_a, we_b;

  address_switch u_aswitch (
    .buffer_select, .pc_addr (int_addr), .corr_addr, .write,
    .addr_a, .addr_b, .we_a, .we_b, .e1a_n, .e1b_n, .e2a_n, .e2b_n
  );

  // ---------------- memory cards and data buses ----------------
  xy_word_t           card_rdata [NUM_CARDS_P];
  logic [NUM_BUS-1:0] card_drive [NUM_CARDS_P];

  for (genvar c = 0; c < NUM_CARDS_P; c++) begin : g_card
    memory_card #(.CARD_NO(c)) u_card (
      .clk, .rst, .buffer_select, .addr_a, .addr_b, .we_a, .we_b,
      .wdata      (in_word),
      .page_we    (page_we[c]),
      .busen_we   (busen_we[c]),
      .page_data, .busen_data,
      .rdata      (card_rdata[c]),
      .drive      (card_drive[c]),
      .page       (),
      .bus_en     ()
    );
  end

  data_bus_control #(.CARDS(NUM_CARDS_P)) u_bus (
    .card_rdata, .card_drive, .corr_enable,
    .bus_data, .bus_drive, .conflict (bus_conflict)
  );

  // ---------------- front panel ----------------
  assign panel_addr_a = addr_a;
  assign panel_addr_b = addr_b;
  assign panel_ch     = ch_q;
  assign panel_data   = display ? in_word : bus_data[0];

endmodule
