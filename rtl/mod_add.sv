// mod_add: modulo-M adder realised as a look-up table.
//
// s = (a + b) mod M for residues a, b in [0, M). For small moduli the
// addition is a table indexed by the concatenated operands {a, b}; the table
// is filled at elaboration. Operand values of M and above are not residues;
// they address table entries that hold 0.
//
// Interface: two W-bit residues in, one W-bit residue out. Purely
// combinational, no clock.
//
// Following the source design, the modulo adder of a MAC unit is a look-up
// table for small moduli; the table form for every adder of the filter
// (including the adder that merges two MAC units of one modulus) is this
// design's choice.
module mod_add #(
  parameter int M = 5,  // modulus
  parameter int W = 3   // residue width, 2**W >= M
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  localparam int ENTRIES = 2 ** (2 * W);
  typedef logic [W-1:0] table_t [ENTRIES];

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < ENTRIES; i++) begin
      int ai, bi;
      ai = i >> W;
      bi = i % (2 ** W);
      t[i] = (ai < M && bi < M) ? W'((ai + bi) % M) : '0;
    end
    return t;
  endfunction

  localparam table_t SUM_TABLE = build_table();

  if (2 ** W < M) begin : g_bad_width
    $error("mod_add: W too small for modulus M");
  end

  assign s = SUM_TABLE[{a, b}];

endmodule
