// coef_addr_gen: Gray-code coefficient address generator.
//
// The coefficients are read in a fixed sequence of ROWS steps per output.
// The address register counts through that sequence in binary-reflected
// Gray code, so consecutive addresses differ in one bit and the address
// bus toggles about half as often as with a binary counter. Step s sits at
// row address gray(s); the sequence wraps from step ROWS-1 back to step 0
// (one bit changes on the wrap when ROWS is a power of two).
//
// Interface: clear forces step 0, advance moves to the next step (clear
// wins). addr is the registered Gray address; last is high at the final
// step ROWS-1. Synchronous active-low reset to step 0.
//
// The Gray-coded coefficient address register follows the source design;
// the next address is found by converting to binary, adding one and
// converting back, which is this design's choice.
module coef_addr_gen #(
  parameter int ROWS = 8,
  parameter int AW   = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          advance,
  output logic [AW-1:0] addr,
  output logic          last
);

  localparam logic [AW-1:0] LAST_ADDR = AW'(rns_pkg::bin2gray(32'(ROWS - 1)));

  logic [AW-1:0] step, step_next;

  always_comb begin
    step = AW'(rns_pkg::gray2bin(32'(addr)));
    step_next = (step == AW'(ROWS - 1)) ? '0 : step + 1'b1;
  end

  assign last = (addr == LAST_ADDR);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) addr <= '0;
    else if (advance)    addr <= AW'(rns_pkg::bin2gray(32'(step_next)));
  end

endmodule
