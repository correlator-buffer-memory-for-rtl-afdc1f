// tb_program_control: runs CAMAC programming sequences (address phase, then
// data phase, as register 2 would step through them) and checks which
// clocks fire: ACK1..ACK8 for program-counters, page / bus-enable writes
// for cards, nothing when another buffer's ident code is addressed, and
// exactly one pulse per phase however long the phase is held.
module tb_program_control;
  import buf_pkg::*;
  logic clk = 0, rst;
  logic [15:0] camac_ad, camac_ctl, prog_data;
  logic [7:0] pc_load, page_we, busen_we;
  logic [3:0] page_data, busen_data;
  logic st_comp, test1_en, test2_en, display, selected, cl_buf_no, endata;
  int checks = 0, failures = 0;
  int n_ack [8];
  int n_page [8], n_busen [8];
  logic [15:0] last_data;

  program_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count pulses
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < 8; i++) begin
      if (pc_load[i])  begin n_ack[i]++;  last_data = prog_data; end
      if (page_we[i])  begin n_page[i]++; last_data = {12'h0, page_data}; end
      if (busen_we[i]) begin n_busen[i]++; last_data = {12'h0, busen_data}; end
    end
  end

  // one programming step; ctl_hi holds bits 6..11
  task automatic do_prog(input logic [7:0] id, input logic [3:0] item,
                         input logic [15:0] data, input logic [15:0] ctl_hi, input int hold);
    @(negedge clk);
    camac_ad  = {id, 4'h0, item};
    camac_ctl = ctl_hi | 16'b111;
    @(negedge clk) camac_ctl = ctl_hi | 16'b100;           // address phase
    repeat (hold + 1) @(negedge clk);
    camac_ctl = ctl_hi | 16'b111;
    @(negedge clk) camac_ad = data;
    @(negedge clk) camac_ctl = ctl_hi | 16'b010;           // data phase
    repeat (hold + 1) @(negedge clk);
    camac_ctl = ctl_hi | 16'b111;
    repeat (2) @(negedge clk);
  endtask

  task automatic expect_counts(string what, int ack[8], int pg[8], int be[8]);
    checks++;
    for (int i = 0; i < 8; i++)
      if (n_ack[i] != ack[i] || n_page[i] != pg[i] || n_busen[i] != be[i]) begin
        failures++;
        $display("FAIL %s: item %0d ack=%0d page=%0d busen=%0d", what, i, n_ack[i], n_page[i], n_busen[i]);
        break;
      end
  endtask

  initial begin
    int ack[8], pg[8], be[8];
    rst = 1; camac_ad = 0; camac_ctl = 16'h0007;
    for (int i = 0; i < 8; i++) begin n_ack[i] = 0; n_page[i] = 0; n_busen[i] = 0; ack[i] = 0; pg[i] = 0; be[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;

    // each program-counter, random data, random hold time
    for (int p = 0; p < 8; p++) begin
      logic [15:0] d;
      d = 16'($urandom);
      do_prog(8'd2, 4'(p), d, 16'h0, $urandom_range(0, 4));
      ack[p]++;
      expect_counts("pc", ack, pg, be);
      checks++;
      if (last_data != d) begin failures++; $display("FAIL pc data"); end
    end
    // other buffer: nothing happens
    do_prog(8'd3, 4'd1, 16'h1234, 16'h0, 1);
    expect_counts("other id", ack, pg, be);
    checks++;
    if (selected) failures++;
    // paging of card 5, bus enable of card 6, both on card 2
    do_prog(8'd2, 4'd5, 16'h0003, 16'h1 << R2_PENABLE, 1);
    pg[5]++;
    expect_counts("page", ack, pg, be);
    checks++; if (last_data != 16'h3) failures++;
    do_prog(8'd2, 4'd6, 16'h00A0, 16'h1 << R2_DENABLE, 2);
    be[6]++;
    expect_counts("busen", ack, pg, be);
    checks++; if (last_data != 16'hA) failures++;
    do_prog(8'd2, 4'd2, 16'h0041, (16'h1 << R2_DENABLE) | (16'h1 << R2_PENABLE), 0);
    pg[2]++; be[2]++;
    expect_counts("both", ack, pg, be);

    // levels of register 2
    for (int b = 6; b < 12; b++) begin
      @(negedge clk) camac_ctl = 16'h0007 | (16'h1 << b);
      #1;
      checks++;
      if ({display, test2_en, test1_en, st_comp} !=
          {b == R2_DISPLAY, b == R2_TEST2, b == R2_TEST1, b == R2_ST_COMP} && b != 9 && b != 10)
        failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
