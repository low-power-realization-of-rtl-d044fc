// tb_mod_add: exhaustive self-checking test of the table-based modulo
// adder for moduli 3, 5 and 7 against (a + b) mod M.
module tb_mod_add;
  int checks = 0, failures = 0;

  logic [1:0] a3, b3, s3;
  logic [2:0] a5, b5, s5, a7, b7, s7;

  mod_add #(.M(3), .W(2)) u_a3 (.a(a3), .b(b3), .s(s3));
  mod_add                 u_a5 (.a(a5), .b(b5), .s(s5));
  mod_add #(.M(7), .W(3)) u_a7 (.a(a7), .b(b7), .s(s7));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 7; a++)
      for (int b = 0; b < 7; b++) begin
        a3 = 2'(a % 3); b3 = 2'(b % 3);
        a5 = 3'(a % 5); b5 = 3'(b % 5);
        a7 = 3'(a);     b7 = 3'(b);
        #1;
        checks += 3;
        if (int'(s3) != (a % 3 + b % 3) % 3) begin failures++; $display("mod3 %0d+%0d -> %0d", a3, b3, s3); end
        if (int'(s5) != (a % 5 + b % 5) % 5) begin failures++; $display("mod5 %0d+%0d -> %0d", a5, b5, s5); end
        if (int'(s7) != (a + b) % 7)         begin failures++; $display("mod7 %0d+%0d -> %0d", a7, b7, s7); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
