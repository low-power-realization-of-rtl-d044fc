// tb_data_mem: self-checking test of the data memory at its default size
// (16 words, 2 read ports). Random writes are mirrored in a copy kept here;
// after each write both read ports read random addresses and must match.
module tb_data_mem;
  int checks = 0, failures = 0;

  logic clk = 0, we = 0;
  logic [3:0] waddr = '0;
  logic [2:0] wdata = '0;
  logic [3:0] raddr [2];
  logic [2:0] rdata [2];
  logic [2:0] model [16];

  data_mem dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a); wdata = 3'($urandom);
      @(posedge clk);
      model[a] = wdata;
    end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = ($urandom_range(1) == 1); waddr = 4'($urandom); wdata = 3'($urandom);
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      raddr[0] = 4'($urandom); raddr[1] = 4'($urandom);
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++;
          $display("port %0d addr %0d: got %0d want %0d", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
