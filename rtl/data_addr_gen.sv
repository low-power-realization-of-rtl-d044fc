// data_addr_gen: circular data address generator.
//
// Instead of shifting every stored sample by one place when a new sample
// arrives, the filter moves a pointer. head is the address of the newest
// sample; on advance it steps to the next location, counting 0, 1, ...,
// N-1 and then back to 0, and the new sample is written there, over the
// oldest one. Sample X[n-i] is then found at (head - i) mod N.
//
// With GRAY set, the data memory is addressed by the Gray code of these
// logical locations: wr_addr, the physical address the new sample is
// written at, is gray(head_next). Logical neighbours then differ in one
// physical address bit, which cuts toggling on the data address bus (the
// read side is converted the same way in the switching matrix). With GRAY
// clear, wr_addr equals head_next.
//
// Interface: advance; head (registered, logical), head_next (logical
// location of the next sample, combinational) and wr_addr (its physical
// address). Synchronous active-low reset sets head to N-1 so that the
// first sample lands at location 0.
//
// The wrapping counter follows the source design, as does Gray coding of
// the data memory address, which the source mentions for the coefficient
// and data memory address buses alike; mapping it onto the circular
// pointer as a Gray-coded physical address, and the reset value, are this
// design's choice.
module data_addr_gen #(
  parameter int N  = 16,
  parameter int AW = $clog2(N),
  parameter bit GRAY = 1'b1      // Gray-coded physical data addresses
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          advance,
  output logic [AW-1:0] head,
  output logic [AW-1:0] head_next,
  output logic [AW-1:0] wr_addr
);

  assign head_next = (head == AW'(N - 1)) ? '0 : head + 1'b1;
  assign wr_addr   = GRAY ? AW'(rns_pkg::bin2gray(32'(head_next))) : head_next;

  always_ff @(posedge clk) begin
    if (!rst_n)       head <= AW'(N - 1);
    else if (advance) head <= head_next;
  end

endmodule
