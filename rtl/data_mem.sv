// data_mem: data memory of one modulus.
//
// Holds the residues of the N most recent input samples for one modulus.
// It is used as a circular buffer: a new sample overwrites the oldest one
// in place, at the address given by the circular data pointer, so no
// sample is ever moved. P read ports let the P MAC units of the modulus
// each read one sample per cycle.
//
// The array spans the full 2**AW address space so that Gray-coded
// addresses of N locations fit when N is not a power of two.
//
// Interface: one write port (we, waddr, wdata) and P read ports (raddr[p],
// rdata[p]). Writes take effect at the clock edge; reads are combinational.
// Not reset: the filter is flushed with samples, or the user accepts a
// start-up transient as with any FIR filter.
//
// The circular use follows the source design; P independent read ports
// (instead of the source figure's two columns of alternate samples, which
// a moving circular pointer cannot keep aligned) are this design's choice.
module data_mem #(
  parameter int N  = 16,
  parameter int P  = 2,
  parameter int W  = 3,
  parameter int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr [P],
  output logic [W-1:0]  rdata [P]
);

  localparam int DEPTH = 2 ** AW;   // Gray-coded addresses of N locations fit here

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar p = 0; p < P; p++) begin : g_rd
    assign rdata[p] = mem[raddr[p]];
  end

endmodule
