// tb_coef_addr_gen: self-checking test of the Gray-code coefficient
// address counter, at its default length (8 steps) and at 6 steps.
// For each step s the address must be s ^ (s >> 1), neighbouring addresses
// must differ in exactly one bit (also across the wrap for 8 steps), last
// must be high only at the final step, advance low must hold and clear
// must return to step 0. The binary address toggles of the same sequence
// are counted for comparison and must be higher.
module tb_coef_addr_gen;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear = 0, adv = 0;
  logic [2:0] addr8, addr6;
  logic last8, last6;

  coef_addr_gen                         u8 (.clk(clk), .rst_n(rst_n), .clear(clear),
                                            .advance(adv), .addr(addr8), .last(last8));
  coef_addr_gen #(.ROWS(6), .AW(3))     u6 (.clk(clk), .rst_n(rst_n), .clear(clear),
                                            .advance(adv), .addr(addr6), .last(last6));

  always #5 clk = ~clk;

  function automatic logic [2:0] gray(int s);
    return 3'(s ^ (s >> 1));
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("%s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] prev8;
    int gray_toggles = 0, bin_toggles = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    adv = 1;
    for (int n = 0; n < 48; n++) begin
      check(addr8 == gray(n % 8), $sformatf("8: step %0d addr %b", n, addr8));
      check(addr6 == gray(n % 6), $sformatf("6: step %0d addr %b", n, addr6));
      check(last8 == ((n % 8) == 7), $sformatf("8: last wrong at step %0d", n));
      check(last6 == ((n % 6) == 5), $sformatf("6: last wrong at step %0d", n));
      if (n > 0) begin
        check($countones(addr8 ^ prev8) == 1, $sformatf("8: %b -> %b not one bit", prev8, addr8));
        gray_toggles += $countones(addr8 ^ prev8);
        bin_toggles  += $countones(3'(n % 8) ^ 3'((n - 1) % 8));
      end
      prev8 = addr8;
      @(negedge clk);
    end
    check(gray_toggles < bin_toggles,
          $sformatf("gray toggles %0d not below binary %0d", gray_toggles, bin_toggles));
    // hold
    adv = 0; @(negedge clk); prev8 = addr8;
    repeat (3) @(negedge clk);
    check(addr8 == prev8, "advance low did not hold");
    // clear
    adv = 1; @(negedge clk); @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    check(addr8 == 3'b000 && addr6 == 3'b000, "clear did not return to step 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
