// tb_timing_control: a filter model answers the handshake with random
// delays. Checks: write is on the clock edge after the one that first
// samples the strobe high, the counter clock and data-received rise together one cycle after
// write, one write per strobe, data-received falls after the strobe falls,
// and every start-compute gives one reload pulse and swaps the sides.
module tb_timing_control;
  logic clk = 0, rst, data_strobe, st_comp_radar, st_comp_camac;
  logic sample_load, write, data_received, count, reload, buffer_select;
  int checks = 0, failures = 0;
  int n_writes, n_counts, n_reload, n_samples;
  int t, t_strobe;

  timing_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) t <= t + 1;

  // monitors
  always @(posedge clk) if (!rst) begin
    if (write) begin
      n_writes++;
      checks++;
      if (t - t_strobe != 1) begin failures++; $display("FAIL write latency %0d", t - t_strobe); end
    end
    if (count) begin
      n_counts++;
      checks++;
      if (!data_received) begin failures++; $display("FAIL count without data_received"); end
    end
    if (reload) n_reload++;
  end

  task automatic sample();
    int d;
    @(negedge clk) data_strobe = 1;
    @(posedge clk) t_strobe = t;
    // wait for acknowledge
    while (!data_received) @(posedge clk);
    d = $urandom_range(0, 3);
    repeat (d) @(negedge clk);
    @(negedge clk) data_strobe = 0;
    @(posedge clk);
    @(posedge clk); #1;
    checks++;
    if (data_received) begin failures++; $display("FAIL data_received stuck"); end
    n_samples++;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  task automatic start_compute(bit from_radar);
    logic sel_before;
    int r0;
    sel_before = buffer_select;
    r0 = n_reload;
    @(negedge clk);
    if (from_radar) st_comp_radar = 1; else st_comp_camac = 1;
    repeat (3) @(negedge clk);
    st_comp_radar = 0; st_comp_camac = 0;
    @(negedge clk);
    checks++;
    if (n_reload != r0 + 1 || buffer_select == sel_before) begin
      failures++; $display("FAIL start compute: reloads %0d sel %b", n_reload - r0, buffer_select);
    end
  endtask

  initial begin
    t = 0; n_writes = 0; n_counts = 0; n_reload = 0; n_samples = 0;
    rst = 1; data_strobe = 0; st_comp_radar = 0; st_comp_camac = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    checks++;
    if (buffer_select !== 1'b1) failures++;
    for (int r = 0; r < 6; r++) begin
      repeat (20) sample();
      start_compute(r[0]);
    end
    checks++;
    if (n_writes != n_samples || n_counts != n_samples) begin
      failures++; $display("FAIL writes %0d counts %0d samples %0d", n_writes, n_counts, n_samples);
    end
    // back-to-back minimum: strobe dropped as soon as data_received seen
    begin
      int t0;
      t0 = t;
      @(negedge clk);
      repeat (10) begin
        data_strobe = 1;
        t_strobe = t;
        while (!data_received) @(negedge clk);
        data_strobe = 0;
        while (data_received) @(negedge clk);
      end
      checks++;
      if (t - t0 > 10 * 4 + 2) begin failures++; $display("FAIL rate: %0d cycles for 10", t - t0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
