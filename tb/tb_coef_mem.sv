// tb_coef_mem: self-checking test of the coefficient memory at its
// default size (8 rows of 2 words, 3-bit words). Every slot is written
// with a random word, then all rows are read and compared with a copy
// kept here; a second round overwrites random slots and reads again.
module tb_coef_mem;
  int checks = 0, failures = 0;

  logic clk = 0, we = 0;
  logic [2:0] waddr = '0, raddr = '0;
  logic [0:0] wlane = '0;
  logic [2:0] wdata = '0;
  logic [2:0] rdata [2];
  logic [2:0] model [8][2];

  coef_mem dut (.clk(clk), .we(we), .waddr(waddr), .wlane(wlane),
                .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int row, int lane, logic [2:0] d);
    @(negedge clk);
    we = 1; waddr = 3'(row); wlane = 1'(lane); wdata = d;
    @(posedge clk);
    model[row][lane] = d;
    #1 we = 0;
  endtask

  task automatic read_all();
    for (int row = 0; row < 8; row++) begin
      raddr = 3'(row);
      #1;
      for (int l = 0; l < 2; l++) begin
        checks++;
        if (rdata[l] !== model[row][l]) begin
          failures++;
          $display("row %0d lane %0d: got %0d want %0d", row, l, rdata[l], model[row][l]);
        end
      end
    end
  endtask

  initial begin
    for (int row = 0; row < 8; row++)
      for (int l = 0; l < 2; l++) write(row, l, 3'($urandom));
    read_all();
    for (int i = 0; i < 20; i++) write($urandom_range(7), $urandom_range(1), 3'($urandom));
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
