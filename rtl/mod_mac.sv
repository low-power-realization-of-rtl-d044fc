// mod_mac: modulo-M multiply-accumulate unit.
//
// A table-based modulo multiplier forms Z = A * X mod M from an encoded
// coefficient residue and a data residue; a table-based modulo adder adds Z
// to the accumulator register ACC, whose output is fed back to the adder.
// On a cycle with en high, ACC takes Z + ACC (mod M), or just Z when first
// is also high, which starts a new sum of products. With en low ACC holds.
//
// Interface: a_code (W-bit coefficient code), x (W-bit data residue), en,
// first; acc is the registered sum. Timing: one product per clock, acc
// shows the sum including a product one clock after that product's cycle.
// Reset (active-low, synchronous) clears ACC.
//
// The multiplier, adder and ACC register with feedback are the source
// design's; the first input (instead of a separate clear cycle) and the
// reset are this design's choice.
module mod_mac #(
  parameter int M = 5,
  parameter int W = 3,
  parameter rns_pkg::code_row_t CODE = rns_pkg::IDENTITY_ROW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         first,
  input  logic [W-1:0] a_code,
  input  logic [W-1:0] x,
  output logic [W-1:0] acc
);

  logic [W-1:0] z;        // product residue
  logic [W-1:0] addend;   // accumulator feedback, or 0 to start a sum
  logic [W-1:0] sum;

  mod_mult #(.M(M), .W(W), .CODE(CODE)) u_mult (
    .a_code(a_code), .x(x), .z(z)
  );

  assign addend = first ? '0 : acc;

  mod_add #(.M(M), .W(W)) u_add (
    .a(z), .b(addend), .s(sum)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= sum;
  end

endmodule
