// tb_rns2bin: exhaustive self-checking test of the RNS-to-binary
// converter: every value of the dynamic range of {5, 7} (35 values) and of
// {3, 5, 7} (105 values) is split into residues here and must come back.
module tb_rns2bin;
  int checks = 0, failures = 0;

  logic [2:0] r2 [2];
  logic [2:0] r3 [3];
  logic [5:0] y2;
  logic [6:0] y3;

  rns2bin                                                     u_k2 (.r(r2), .y(y2));
  localparam int MODS3 [3] = '{3, 5, 7};
  rns2bin #(.K(3), .MODULI(MODS3), .RW(3), .OW(7)) u_k3 (.r(r3), .y(y3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 35; v++) begin
      r2[0] = 3'(v % 5); r2[1] = 3'(v % 7);
      #1;
      checks++;
      if (int'(y2) != v) begin failures++; $display("{5,7}: want %0d got %0d", v, y2); end
    end
    for (int v = 0; v < 105; v++) begin
      r3[0] = 3'(v % 3); r3[1] = 3'(v % 5); r3[2] = 3'(v % 7);
      #1;
      checks++;
      if (int'(y3) != v) begin failures++; $display("{3,5,7}: want %0d got %0d", v, y3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
