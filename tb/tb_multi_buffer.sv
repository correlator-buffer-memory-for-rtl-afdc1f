// tb_multi_buffer: two buffers (ident codes 2 and 3) on one matched filter
// and one pair of CAMAC registers, as in a system with several
// correlators. Program-counter 1 of buffer 2 is set to start at 0 and that
// of buffer 3 at 1024, through the shared registers and the ident-code
// field. The filter waits for both buffers' data-received. After a swap, each
// buffer must hold the same sample stream at its own start address.
module tb_multi_buffer;
  import buf_pkg::*;

  logic clk = 0, rst;
  xy_word_t filt_data;
  logic [2:0] filt_ch;
  logic filt_strobe, radar_st_comp;
  logic [1:0] drcv;
  logic [15:0] camac_ad, camac_ctl, corr_addr;
  xy_word_t bus_data [2][4];
  logic [3:0] bus_drive [2];
  xy_word_t samples [600];
  int checks = 0, failures = 0;

  for (genvar b = 0; b < 2; b++) begin : g_buf
    buffer_memory #(.BUFFER_ID(8'(2 + b))) u_buf (
      .clk, .rst, .filt_data, .filt_ch, .filt_strobe,
      .filt_data_received (drcv[b]),
      .radar_st_comp, .camac_ad, .camac_ctl, .corr_addr,
      .corr_enable (1'b1),
      .bus_data (bus_data[b]), .bus_drive (bus_drive[b]),
      .bus_conflict (), .buffer_select (),
      .e1a_n (), .e1b_n (), .e2a_n (), .e2b_n (),
      .panel_addr_a (), .panel_addr_b (), .panel_ch (), .panel_data ()
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic camac(input logic [7:0] id, input logic [3:0] item, input logic [15:0] data);
    @(negedge clk) begin camac_ad = {id, 4'h0, item}; camac_ctl = 16'b111; end
    @(negedge clk) camac_ctl = 16'b100;
    @(negedge clk) begin camac_ctl = 16'b111; camac_ad = data; end
    @(negedge clk) camac_ctl = 16'b010;
    @(negedge clk) camac_ctl = 16'b111;
  endtask

  task automatic start_compute();
    @(negedge clk) radar_st_comp = 1;
    @(negedge clk) radar_st_comp = 0;
    @(negedge clk);
  endtask

  initial begin
    rst = 1; filt_data = 0; filt_ch = 0; filt_strobe = 0; radar_st_comp = 0;
    camac_ad = 0; camac_ctl = 16'b111; corr_addr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    camac(8'd2, 4'd0, 16'd0);
    camac(8'd3, 4'd0, 16'd1024);
    start_compute();
    for (int i = 0; i < 600; i++) begin
      samples[i] = 16'($urandom);
      if (samples[i].x == 8'h80) samples[i].x = 8'h81;
      if (samples[i].y == 8'h80) samples[i].y = 8'h81;
      @(negedge clk) begin filt_data = samples[i]; filt_ch = 3'd0; filt_strobe = 1; end
      while (drcv != 2'b11) @(negedge clk);
      filt_strobe = 0;
      while (drcv != 2'b00) @(negedge clk);
    end
    start_compute();
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 600; i++) begin
        @(negedge clk) corr_addr = 16'(b * 1024 + i);
        @(posedge clk); #1;
        checks++;
        if (bus_data[b][0] != samples[i] || !bus_drive[b][0]) begin
          failures++;
          $display("FAIL buffer %0d word %0d: %h expected %h", b + 2, i, bus_data[b][0], samples[i]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
