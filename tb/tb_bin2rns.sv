// tb_bin2rns: exhaustive self-checking test of the binary-to-RNS
// converter for every signed 8-bit input, with moduli {5, 7} (default)
// and {3, 5, 7}, against the mathematical residue computed here.
module tb_bin2rns;
  int checks = 0, failures = 0;

  logic signed [7:0] x;
  logic [2:0] r2 [2];
  logic [2:0] r3 [3];

  bin2rns                                            u_k2 (.x(x), .r(r2));
  localparam int MODS3 [3] = '{3, 5, 7};
  bin2rns #(.K(3), .MODULI(MODS3), .XW(8), .RW(3)) u_k3 (.x(x), .r(r3));

  function automatic int res(int v, int m);
    int q = v % m;
    return (q < 0) ? q + m : q;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mods2 [2] = '{5, 7};
    int mods3 [3] = '{3, 5, 7};
    for (int v = -128; v < 128; v++) begin
      x = 8'(v);
      #1;
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (int'(r2[i]) != res(v, mods2[i])) begin
          failures++; $display("x=%0d mod %0d got %0d", v, mods2[i], r2[i]);
        end
      end
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (int'(r3[i]) != res(v, mods3[i])) begin
          failures++; $display("x=%0d mod %0d got %0d", v, mods3[i], r3[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
