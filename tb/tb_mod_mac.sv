// tb_mod_mac: self-checking test of the modulo MAC unit.
//
// A modulo-7 MAC with permuted coefficient codes is fed random
// coefficient / data residue pairs; first restarts the sum at random
// points and en is dropped at random to check that ACC holds. The expected
// accumulator is kept here with integer arithmetic, one clock behind the
// inputs.
module tb_mod_mac;
  import rns_pkg::*;

  int checks = 0, failures = 0;

  function automatic code_row_t codes7();
    code_row_t c = IDENTITY_ROW;
    c[0] = 5'b100; c[1] = 5'b000; c[2] = 5'b001; c[3] = 5'b010;
    c[4] = 5'b011; c[5] = 5'b101; c[6] = 5'b110;
    return c;
  endfunction
  localparam code_row_t C7 = codes7();

  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic [2:0] a_code = '0, x = '0, acc;
  int model = 0;

  mod_mac #(.M(7), .W(3), .CODE(C7)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .first(first),
    .a_code(a_code), .x(x), .acc(acc)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, xv;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (acc !== '0) begin failures++; $display("acc not cleared by reset"); end
    for (int n = 0; n < 1000; n++) begin
      r  = $urandom_range(6);
      xv = $urandom_range(6);
      en    = ($urandom_range(3) != 0);
      first = ($urandom_range(7) == 0);
      a_code = C7[r][2:0];
      x = 3'(xv);
      @(posedge clk);
      if (en) model = first ? (r * xv) % 7 : (model + r * xv) % 7;
      @(negedge clk);
      checks++;
      if (int'(acc) != model) begin
        failures++;
        $display("step %0d: acc %0d want %0d", n, acc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
