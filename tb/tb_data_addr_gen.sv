// tb_data_addr_gen: self-checking test of the circular data pointer at 16
// locations with Gray-coded write addresses (default) and at 5 locations
// with binary ones: after reset head is N-1, each advance moves to
// head_next = (head + 1) mod N, advance low holds, and wr_addr is
// gray(head_next) or head_next respectively.
module tb_data_addr_gen;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, adv = 0;
  logic [3:0] h16, n16, w16;
  logic [2:0] h5, n5, w5;

  data_addr_gen u16 (.clk(clk), .rst_n(rst_n), .advance(adv), .head(h16), .head_next(n16), .wr_addr(w16));
  data_addr_gen #(.N(5), .AW(3), .GRAY(1'b0)) u5 (.clk(clk), .rst_n(rst_n), .advance(adv),
                                                  .head(h5), .head_next(n5), .wr_addr(w5));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e16 = 15, e5 = 4;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      checks += 6;
      if (int'(w16) != (((e16 + 1) % 16) ^ (((e16 + 1) % 16) >> 1))) begin failures++; $display("16: wr_addr %0d", w16); end
      if (int'(w5)  != (e5 + 1) % 5) begin failures++; $display("5: wr_addr %0d", w5); end
      if (int'(h16) != e16) begin failures++; $display("16: head %0d want %0d", h16, e16); end
      if (int'(h5)  != e5)  begin failures++; $display("5: head %0d want %0d", h5, e5); end
      if (int'(n16) != (e16 + 1) % 16) begin failures++; $display("16: next %0d", n16); end
      if (int'(n5)  != (e5 + 1) % 5)   begin failures++; $display("5: next %0d", n5); end
      adv = ($urandom_range(3) != 0);
      @(posedge clk);
      if (adv) begin e16 = (e16 + 1) % 16; e5 = (e5 + 1) % 5; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
