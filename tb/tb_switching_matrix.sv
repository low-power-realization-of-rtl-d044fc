// tb_switching_matrix: self-checking test of the switching matrix at its
// default size (16 taps, 2 lanes, 8 rows). A random permutation of the
// taps is loaded over the slots; for random head positions and every row,
// each lane's data address must be gray((head - tap) mod 16) for the
// default instance (Gray-coded data addresses) and (head - tap) mod 16 for
// a second instance with binary data addresses.
module tb_switching_matrix;
  int checks = 0, failures = 0;

  logic clk = 0, we = 0;
  logic [2:0] waddr = '0, raddr = '0;
  logic [0:0] wlane = '0;
  logic [3:0] wtap = '0, head = '0;
  logic [3:0] rd_addr [2];
  logic [3:0] rd_bin [2];
  int perm [16];

  switching_matrix dut (.clk(clk), .we(we), .waddr(waddr), .wlane(wlane),
                        .wtap(wtap), .raddr(raddr), .head(head), .rd_addr(rd_addr));
  switching_matrix #(.GRAY(1'b0)) dut_bin (.clk(clk), .we(we), .waddr(waddr), .wlane(wlane),
                        .wtap(wtap), .raddr(raddr), .head(head), .rd_addr(rd_bin));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (perm[i]) perm[i] = i;
    perm.shuffle();
    for (int s = 0; s < 16; s++) begin
      @(negedge clk);
      we = 1; waddr = 3'(s / 2); wlane = 1'(s % 2); wtap = 4'(perm[s]);
    end
    @(negedge clk); we = 0;
    for (int h = 0; h < 20; h++) begin
      head = 4'($urandom);
      for (int row = 0; row < 8; row++) begin
        raddr = 3'(row);
        #1;
        for (int l = 0; l < 2; l++) begin
          int lg;
          lg = (int'(head) - perm[2*row+l] + 16) % 16;
          checks += 2;
          if (int'(rd_addr[l]) != (lg ^ (lg >> 1))) begin
            failures++;
            $display("gray: head %0d row %0d lane %0d: got %0d", head, row, l, rd_addr[l]);
          end
          if (int'(rd_bin[l]) != lg) begin
            failures++;
            $display("binary: head %0d row %0d lane %0d: got %0d", head, row, l, rd_bin[l]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
