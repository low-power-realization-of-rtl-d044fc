// tb_fir_ctrl: self-checking test of the filter sequencer. A Gray address
// counter of 8 steps closes the loop (addr_last). Checked per output: the
// accept cycle writes the sample and clears the address, exactly 8 MAC
// cycles follow with mac_first only on the first, y_valid comes 9 cycles
// after the accept, x_ready is low during the MAC cycles (an offered
// sample waits) and a waiting sample is accepted in the y_valid cycle.
module tb_fir_ctrl;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic x_ready, addr_last, sample_we, addr_clear, addr_advance;
  logic mac_en, mac_first, y_valid;
  logic [2:0] addr;

  fir_ctrl dut (.clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_ready(x_ready),
                .addr_last(addr_last), .sample_we(sample_we), .addr_clear(addr_clear),
                .addr_advance(addr_advance), .mac_en(mac_en), .mac_first(mac_first),
                .y_valid(y_valid));

  coef_addr_gen u_addr (.clk(clk), .rst_n(rst_n), .clear(addr_clear),
                        .advance(addr_advance), .addr(addr), .last(addr_last));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("%s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycle-level monitor.
  int cyc = 0, accept_cyc = -1, macs = 0, firsts = 0, outputs = 0, stalls = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (x_valid && !x_ready) stalls++;
    if (mac_en) begin
      macs++;
      if (mac_first) begin
        firsts++;
        check(cyc == accept_cyc + 1, "mac_first not right after accept");
      end
    end
    if (y_valid) begin
      outputs++;
      check(cyc == accept_cyc + 9, $sformatf("y_valid %0d cycles after accept", cyc - accept_cyc));
      check(macs == 8, $sformatf("%0d MAC cycles for one output", macs));
      check(firsts == 1, "mac_first count wrong");
      macs = 0; firsts = 0;
    end
    if (sample_we) begin
      check(x_ready && x_valid && addr_clear, "sample_we without handshake");
      check(!mac_en, "sample accepted during MAC cycles");
      accept_cyc = cyc;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // single, spaced samples
    repeat (3) begin
      @(negedge clk); x_valid = 1;
      @(negedge clk); x_valid = 0;
      repeat (12) @(negedge clk);
    end
    // continuous stream: samples wait while busy
    x_valid = 1;
    repeat (60) @(negedge clk);
    x_valid = 0;
    repeat (12) @(negedge clk);
    check(outputs >= 9, $sformatf("only %0d outputs", outputs));
    check(stalls > 0, "no stall was seen");
    $display("outputs=%0d stall_cycles=%0d", outputs, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
