// tb_buffer_memory: end-to-end test of the buffer at its default size
// (8 cards, 8k words per side, ident code 2).
//
// A matched-filter model, a CAMAC model and a correlator model drive the
// top. The test programs the 8 program-counters (channel n starts at
// n * 1k), sets up 4 output blocks of 2k (cards 2k and 2k+1 answer pages 0
// and 1 and drive bus k+1: one correlator and three slaves), and then runs
// measurement intervals separated by start-compute. In each interval the
// filter writes random samples of random channels into one side while the
// correlator reads back the side written in the previous interval, at the
// same time, and every bus word is compared with a reference model of the
// memory. Further intervals use the internal PROM and the x/y simulator as
// sources, a single output block on bus 1, an address outside the memory,
// a wrongly addressed CAMAC write, a bus conflict, the correlator's bus
// disable and the front-panel data display. Each of these mechanisms is
// counted and a failure is counted for any that never happened. The
// filter handshake rate (4 clocks per sample) and the read latency
// (1 clock) are checked.
module tb_buffer_memory;
  import buf_pkg::*;

  logic clk = 0, rst;
  xy_word_t filt_data;
  logic [2:0] filt_ch;
  logic filt_strobe, filt_data_received, radar_st_comp;
  logic [15:0] camac_ad, camac_ctl, corr_addr;
  logic corr_enable;
  xy_word_t bus_data [4];
  logic [3:0] bus_drive;
  logic bus_conflict, buffer_select, e1a_n, e1b_n, e2a_n, e2b_n;
  logic [15:0] panel_addr_a, panel_addr_b;
  logic [2:0] panel_ch;
  xy_word_t panel_data;

  buffer_memory dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_swap, n_correct, n_prom, n_sim, n_bus_off, n_conflict, n_ignored,
      n_outside, n_display, n_camac_stcomp, n_radar_stcomp, n_concurrent;

  // reference model
  xy_word_t    ref_mem [2][8192];    // [side: 0 = A, 1 = B]
  logic [15:0] pc_start [8];
  logic [15:0] pc_cnt [8];
  logic [15:0] ctl_hi;
  logic        sel_model;            // 1: A written
  int          cyc;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic xy_word_t fix(xy_word_t w);
    fix = w;
    if (w.x == 8'h80) fix.x = 8'h81;
    if (w.y == 8'h80) fix.y = 8'h81;
  endfunction

  // ---------------- CAMAC ----------------
  task automatic camac(input logic [7:0] id, input logic [3:0] item,
                       input logic [15:0] data, input logic [15:0] mode);
    @(negedge clk);
    camac_ad  = {id, 4'h0, item};
    camac_ctl = ctl_hi | mode | 16'b111;
    @(negedge clk) camac_ctl = ctl_hi | mode | 16'b100;
    @(negedge clk) camac_ctl = ctl_hi | mode | 16'b111;
    camac_ad = data;
    @(negedge clk) camac_ctl = ctl_hi | mode | 16'b010;
    @(negedge clk) camac_ctl = ctl_hi | mode | 16'b111;
    @(negedge clk);
  endtask

  task automatic set_ctl(input logic [15:0] hi);
    @(negedge clk);
    ctl_hi = hi;
    camac_ctl = ctl_hi | 16'b111;
  endtask

  task automatic program_pc(int p, logic [15:0] a);
    camac(8'd2, 4'(p), a, 16'h0);
    pc_start[p] = a;
  endtask

  task automatic program_card(int c, logic [3:0] pg, logic [3:0] be);
    camac(8'd2, 4'(c), {8'h0, be, pg}, (16'h1 << R2_PENABLE) | (16'h1 << R2_DENABLE));
  endtask

  task automatic start_compute(bit via_camac);
    @(negedge clk);
    if (via_camac) begin camac_ctl = ctl_hi | (16'h1 << R2_ST_COMP) | 16'b111; n_camac_stcomp++; end
    else begin radar_st_comp = 1; n_radar_stcomp++; end
    @(negedge clk);
    @(negedge clk);
    radar_st_comp = 0;
    camac_ctl = ctl_hi | 16'b111;
    @(negedge clk);
    sel_model = !sel_model;
    for (int p = 0; p < 8; p++) pc_cnt[p] = 0;
    checks++;
    if (buffer_select != sel_model || {e1a_n, e1b_n, e2a_n, e2b_n} != (sel_model ? 4'b0110 : 4'b1001)) begin
      failures++; $display("FAIL side swap");
    end else n_swap++;
  endtask

  // ---------------- filter ----------------
  // expected: the word that will be stored (after source selection and correction)
  task automatic send(input logic [2:0] ch, input xy_word_t raw, input xy_word_t expected);
    logic [15:0] a;
    int t0;
    a = pc_start[ch] + pc_cnt[ch];
    pc_cnt[ch]++;
    if (expected != raw) n_correct += (raw.x == 8'h80) + (raw.y == 8'h80);
    if (a < 16'd8192) ref_mem[sel_model ? 0 : 1][a] = expected;
    else n_outside++;
    filt_data = raw; filt_ch = ch; filt_strobe = 1;
    t0 = cyc;
    while (!filt_data_received) @(negedge clk);
    filt_strobe = 0;
    filt_data = 16'($urandom); filt_ch = 3'($urandom);
    while (filt_data_received) @(negedge clk);
    checks++;
    if (cyc - t0 > 4) begin failures++; $display("FAIL handshake took %0d cycles", cyc - t0); end
    if (ctl_hi[R2_DISPLAY]) begin
      checks++;
      if (panel_data != expected) begin failures++; $display("FAIL panel data"); end
      else n_display++;
    end
  endtask

  task automatic send_random(int n, int nch);
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      xy_word_t w;
      logic [2:0] ch;
      w = 16'($urandom);
      if ($urandom_range(0, 7) == 0) w.x = 8'h80;
      if ($urandom_range(0, 7) == 0) w.y = 8'h80;
      ch = 3'($urandom_range(0, nch - 1));
      send(ch, w, fix(w));
    end
  endtask

  // ---------------- correlator ----------------
  // reads addresses 0..n-1 of the read side; block layout: bus k shows
  // word block_base[k] + a; bus_mask: buses that must be driven
  task automatic corr_read(int n, int blk, logic [3:0] bus_mask);
    int side;
    side = sel_model ? 1 : 0;       // read side
    for (int a = 0; a < n; a++) begin
      @(negedge clk) corr_addr = 16'(a);
      @(posedge clk); #1;
      checks++;
      if (bus_drive != bus_mask || bus_conflict) begin
        failures++; $display("FAIL drive %b at %0d", bus_drive, a);
      end else begin
        for (int k = 0; k < 4; k++)
          if (bus_mask[k] && bus_data[k] != ref_mem[side][k * blk + a]) begin
            failures++;
            $display("FAIL bus %0d addr %0d: %h expected %h", k + 1, a, bus_data[k], ref_mem[side][k * blk + a]);
            break;
          end
      end
    end
  endtask

  task automatic clear_side();
    // fill the written side's areas of all channels with known words
    for (int p = 0; p < 8; p++) program_pc(p, 16'(p * 1024));
    start_compute(0);
    for (int i = 0; i < 1024; i++)
      for (int p = 0; p < 8; p++) send(3'(p), 16'(i * 8 + p), fix(16'(i * 8 + p)));
  endtask

  initial begin
    cyc = 0;
    n_swap = 0; n_correct = 0; n_prom = 0; n_sim = 0; n_bus_off = 0; n_conflict = 0;
    n_ignored = 0; n_outside = 0; n_display = 0; n_camac_stcomp = 0; n_radar_stcomp = 0;
    n_concurrent = 0;
    rst = 1; filt_data = 0; filt_ch = 0; filt_strobe = 0; radar_st_comp = 0;
    camac_ad = 0; ctl_hi = 0; camac_ctl = 16'b111; corr_addr = 0; corr_enable = 1;
    sel_model = 1;
    for (int p = 0; p < 8; p++) begin pc_start[p] = 0; pc_cnt[p] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // Both sides filled with known data, so every read is defined.
    clear_side();
    clear_side();

    // Configuration: 4 blocks of 2k on buses 1..4 (one correlator, three slaves).
    for (int c = 0; c < 8; c++) program_card(c, 4'(c % 2), 4'b0001 << (c / 2));
    // a write addressed to another buffer must change nothing
    camac(8'd5, 4'd0, 16'h7777, 16'h0);
    n_ignored++;

    // Interval 1: random samples of 8 channels.
    start_compute(0);
    send_random(3000, 8);
    // Interval 2: read interval 1 on 4 buses while new samples arrive.
    start_compute(1);
    fork
      send_random(2000, 8);
      corr_read(2048, 2048, 4'b1111);
    join
    n_concurrent++;
    // Interval 3: read interval 2.
    start_compute(0);
    corr_read(2048, 2048, 4'b1111);

    // Correlator disables all buses.
    @(negedge clk) begin corr_enable = 0; corr_addr = 16'd5; end
    @(posedge clk); #1;
    checks++;
    if (bus_drive != 4'b0) begin failures++; $display("FAIL bus disable"); end else n_bus_off++;
    @(negedge clk) corr_enable = 1;

    // Interval with the internal PROM (test 1) into channel 1, display on.
    set_ctl((16'h1 << R2_TEST1) | (16'h1 << R2_DISPLAY));
    start_compute(0);
    for (int i = 0; i < 600; i++) begin
      xy_word_t w;
      int k;
      k = i % 512;
      w.x = 8'((37 * k + 5) % 256);
      w.y = 8'((101 * k + 11) % 256);
      send(3'd0, 16'($urandom), fix(w));
      n_prom++;
    end
    // Interval with the x/y simulator (test 2) into channel 3.
    set_ctl(16'h1 << R2_TEST2);
    start_compute(0);
    for (int i = 0; i < 300; i++) begin
      xy_word_t w;
      w.x = 8'(i); w.y = 8'(255 - i);
      send(3'd2, 16'($urandom), fix(w));
      n_sim++;
    end
    set_ctl(16'h0);
    // Read the PROM interval (channel 1 area = words 0..1023, block 0).
    start_compute(0);
    corr_read(1024, 2048, 4'b1111);
    // Read the simulator interval.
    start_compute(1);
    corr_read(2048, 2048, 4'b1111);

    // Single block on bus 1 (whole memory), channel 8 moved outside the memory.
    for (int c = 0; c < 8; c++) program_card(c, 4'(c), 4'b0001);
    program_pc(7, 16'h4000);
    start_compute(0);
    send_random(1500, 8);
    start_compute(0);
    corr_read(8192, 8192, 4'b0001);

    // Bus conflict: cards 0 and 1 both answer page 0 on bus 1.
    program_card(1, 4'd0, 4'b0001);
    @(negedge clk) corr_addr = 16'd3;
    @(posedge clk); #1;
    checks++;
    if (!bus_conflict) begin failures++; $display("FAIL conflict not flagged"); end
    else n_conflict++;

    // every mechanism must have happened
    checks++;
    if (n_swap < 2 || n_correct == 0 || n_prom == 0 || n_sim == 0 || n_bus_off == 0 ||
        n_conflict == 0 || n_ignored == 0 || n_outside == 0 || n_display == 0 ||
        n_camac_stcomp == 0 || n_radar_stcomp == 0 || n_concurrent == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: swaps=%0d corrections=%0d prom=%0d sim=%0d bus_off=%0d conflict=%0d ignored=%0d outside=%0d display=%0d camac_stcomp=%0d radar_stcomp=%0d concurrent=%0d",
             n_swap, n_correct, n_prom, n_sim, n_bus_off, n_conflict, n_ignored, n_outside,
             n_display, n_camac_stcomp, n_radar_stcomp, n_concurrent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
