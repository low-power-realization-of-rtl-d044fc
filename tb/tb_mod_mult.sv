// tb_mod_mult: self-checking test of the table-based modulo multiplier.
//
// Three instances: modulo 3 with binary codes, checked row by row against
// the published modulo-3 multiplication table (A, X -> Y in 2-bit binary);
// modulo 5 and modulo 7 with permuted coefficient codes (residue 0 coded as
// 010 and as 100 respectively), checked exhaustively against (a * x) mod M
// computed here with integer arithmetic.
module tb_mod_mult;
  import rns_pkg::*;

  int checks = 0, failures = 0;

  // Permuted code tables: residue r -> code word.
  function automatic code_row_t codes5();
    code_row_t c = IDENTITY_ROW;
    c[0] = 5'b010; c[1] = 5'b000; c[2] = 5'b001; c[3] = 5'b011; c[4] = 5'b111;
    return c;
  endfunction
  function automatic code_row_t codes7();
    code_row_t c = IDENTITY_ROW;
    c[0] = 5'b100; c[1] = 5'b000; c[2] = 5'b001; c[3] = 5'b010;
    c[4] = 5'b011; c[5] = 5'b101; c[6] = 5'b110;
    return c;
  endfunction
  localparam code_row_t C5 = codes5();
  localparam code_row_t C7 = codes7();

  logic [1:0] a3, x3, z3;
  logic [2:0] a5, x5, z5, a7, x7, z7;

  mod_mult #(.M(3), .W(2))             u_m3 (.a_code(a3), .x(x3), .z(z3));
  mod_mult #(.M(5), .W(3), .CODE(C5))  u_m5 (.a_code(a5), .x(x5), .z(z5));
  mod_mult #(.M(7), .W(3), .CODE(C7))  u_m7 (.a_code(a7), .x(x7), .z(z7));

  // Published modulo-3 table rows {A, X, Y}.
  logic [5:0] fig_rows [9] = '{6'b00_00_00, 6'b00_01_00, 6'b00_10_00,
                               6'b01_00_00, 6'b01_01_01, 6'b01_10_10,
                               6'b10_00_00, 6'b10_01_10, 6'b10_10_01};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (fig_rows[i]) begin
      {a3, x3} = fig_rows[i][5:2];
      #1;
      checks++;
      if (z3 !== fig_rows[i][1:0]) begin
        failures++;
        $display("mod3: A=%b X=%b got %b want %b", a3, x3, z3, fig_rows[i][1:0]);
      end
    end
    for (int r = 0; r < 5; r++)
      for (int x = 0; x < 5; x++) begin
        a5 = C5[r][2:0]; x5 = 3'(x);
        #1;
        checks++;
        if (int'(z5) != (r * x) % 5) begin
          failures++;
          $display("mod5: r=%0d x=%0d got %0d", r, x, z5);
        end
      end
    for (int r = 0; r < 7; r++)
      for (int x = 0; x < 7; x++) begin
        a7 = C7[r][2:0]; x7 = 3'(x);
        #1;
        checks++;
        if (int'(z7) != (r * x) % 7) begin
          failures++;
          $display("mod7: r=%0d x=%0d got %0d", r, x, z7);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
