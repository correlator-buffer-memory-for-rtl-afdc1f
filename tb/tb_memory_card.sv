// tb_memory_card: card in slot 3. Writes go to the written side only when
// the address lies in the card's own 1k slot; reads answer the programmed
// page, one clock after the address, and raise the bus lines the card's
// switches select. Contents are checked against a reference array.
module tb_memory_card;
  import buf_pkg::*;
  localparam int SLOT = 3;
  logic clk = 0, rst, buffer_select, we_a, we_b, page_we, busen_we;
  logic [15:0] addr_a, addr_b;
  xy_word_t wdata, rdata;
  logic [3:0] page_data, busen_data, drive, page, bus_en;
  xy_word_t ref_a [1024], ref_b [1024];
  int checks = 0, failures = 0;

  memory_card #(.CARD_NO(SLOT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write n random words to the written side, some outside the slot
  task automatic fill(int n);
    for (int i = 0; i < n; i++) begin
      logic [15:0] a;
      a = (i % 4 == 3) ? 16'($urandom) : 16'(SLOT * 1024 + $urandom_range(0, 1023));
      @(negedge clk);
      wdata = 16'($urandom);
      if (buffer_select) begin addr_a = a; we_a = 1; end
      else               begin addr_b = a; we_b = 1; end
      @(posedge clk);
      if (a[15:10] == 6'(SLOT)) begin
        if (buffer_select) ref_a[a[9:0]] = wdata; else ref_b[a[9:0]] = wdata;
      end
      @(negedge clk) begin we_a = 0; we_b = 0; end
    end
  endtask

  // read n addresses from the read side and compare
  task automatic readback(int n, logic [3:0] pg, logic [3:0] be);
    for (int i = 0; i < n; i++) begin
      logic [15:0] a;
      logic hit;
      a = (i % 3 == 2) ? 16'($urandom) : 16'(pg * 1024 + $urandom_range(0, 1023));
      hit = (a[15:10] == 6'(pg));
      @(negedge clk);
      if (buffer_select) addr_b = a; else addr_a = a;
      @(posedge clk); #1;
      checks++;
      if (drive != (hit ? be : 4'b0)) begin
        failures++; $display("FAIL drive %b for addr %h", drive, a);
      end else if (hit && rdata != (buffer_select ? ref_b[a[9:0]] : ref_a[a[9:0]])) begin
        failures++; $display("FAIL data %h for addr %h", rdata, a);
      end
    end
  endtask

  initial begin
    rst = 1; buffer_select = 1; we_a = 0; we_b = 0; page_we = 0; busen_we = 0;
    addr_a = 0; addr_b = 0; wdata = 0; page_data = 0; busen_data = 0;
    for (int i = 0; i < 1024; i++) begin ref_a[i] = 0; ref_b[i] = 0; end
    repeat (2) @(posedge clk);
    // clear memory contents through the write port so the reference matches
    @(negedge clk) rst = 0;
    for (int side = 0; side < 2; side++) begin
      buffer_select = (side == 0);
      for (int i = 0; i < 1024; i++) begin
        @(negedge clk);
        wdata = 0;
        if (buffer_select) begin addr_a = 16'(SLOT * 1024 + i); we_a = 1; end
        else               begin addr_b = 16'(SLOT * 1024 + i); we_b = 1; end
      end
      @(negedge clk) begin we_a = 0; we_b = 0; end
    end
    checks++;
    if (page != 4'(SLOT) || bus_en != 4'b0001) begin failures++; $display("FAIL reset values"); end

    // side A written, then read with default page
    @(negedge clk) buffer_select = 1;
    fill(600);
    @(negedge clk) buffer_select = 0;
    readback(300, 4'(SLOT), 4'b0001);
    // reprogram page and bus enable, read side A again
    @(negedge clk) begin page_we = 1; page_data = 4'd1; busen_we = 1; busen_data = 4'b0100; end
    @(negedge clk) begin page_we = 0; busen_we = 0; end
    readback(300, 4'd1, 4'b0100);
    // side B written while A is read, then B read
    fill(600);
    @(negedge clk) buffer_select = 1;
    readback(300, 4'd1, 4'b0100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
