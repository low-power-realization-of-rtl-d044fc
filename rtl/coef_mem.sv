// coef_mem: coefficient memory of one modulus.
//
// Holds the N coefficient residues of the filter for one modulus, as code
// words (coefficient encoding, see mod_mult). It is organised as ROWS = N/P
// rows of P words: with the parallel-processing transform (P = 2) a row
// feeds one word to each of the P MAC units of the modulus in the same
// cycle. Which tap sits in which slot is free (coefficient ordering); the
// switching matrix records it.
//
// Rows are addressed by the Gray code of their step, so when ROWS is not a
// power of two the array spans the full 2**AW address space; the addresses
// no step uses are left unused.
//
// Interface: one write port (we, waddr row, wlane word in the row, wdata)
// and one read port (raddr row, rdata[P]). Writes take effect at the clock
// edge; reads are combinational (asynchronous), like the look-up tables the
// words feed. The memory is not reset: it is loaded before the filter runs.
//
// The row-of-P organisation follows the source design's figures; the write
// port and the asynchronous read are this design's choice.
module coef_mem #(
  parameter int N    = 16,            // filter taps
  parameter int P    = 2,             // words per row (MAC units per modulus)
  parameter int W    = 3,             // code word width
  parameter int ROWS = N / P,
  parameter int AW   = (ROWS > 1) ? $clog2(ROWS) : 1,  // row address width
  parameter int LW   = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [LW-1:0] wlane,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata [P]
);

  localparam int DEPTH = 2 ** AW;   // Gray addresses of ROWS steps fit here

  logic [W-1:0] mem [DEPTH][P];

  always_ff @(posedge clk) begin
    if (we) mem[waddr][wlane] <= wdata;
  end

  for (genvar p = 0; p < P; p++) begin : g_rd
    assign rdata[p] = mem[raddr][p];
  end

endmodule
