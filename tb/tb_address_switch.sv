// tb_address_switch: for both sides and both write levels, checks the
// routing of the two address sources, the write enables and the levels of
// E1A/E1B/E2A/E2B (side A written: E1B = E2A = 1, E1A = E2B = 0).
module tb_address_switch;
  logic buffer_select, write, we_a, we_b, e1a_n, e1b_n, e2a_n, e2b_n;
  logic [15:0] pc_addr, corr_addr, addr_a, addr_b;
  int checks = 0, failures = 0;

  address_switch dut (.buffer_select, .pc_addr, .corr_addr, .write, .addr_a, .addr_b,
                      .we_a, .we_b, .e1a_n, .e1b_n, .e2a_n, .e2b_n);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      {buffer_select, write} = 2'(i);
      pc_addr = 16'($urandom); corr_addr = 16'($urandom);
      #1;
      checks++;
      if (buffer_select) begin
        if (addr_a != pc_addr || addr_b != corr_addr || we_a != write || we_b ||
            {e1a_n, e1b_n, e2a_n, e2b_n} != 4'b0110) failures++;
      end else begin
        if (addr_b != pc_addr || addr_a != corr_addr || we_b != write || we_a ||
            {e1a_n, e1b_n, e2a_n, e2b_n} != 4'b1001) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
