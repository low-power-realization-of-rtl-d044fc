// bin2rns: binary to residue number system (RNS) converter.
//
// Takes a signed two's-complement sample x and gives its residue with
// respect to each of the K moduli, r[i] = x mod MODULI[i] in [0, MODULI[i]).
// A negative x gets the non-negative residue of the same class, so the RNS
// filter computes the convolution of the signed samples modulo the dynamic
// range. Each residue is a remainder by a constant, so the logic is fixed at
// elaboration.
//
// Interface: x (XW bits, signed) in, r[K] (RW bits each, binary coded) out.
// Purely combinational.
//
// The converter's place and job follow the source design, which only names
// it; the remainder-by-constant form, signed input and the sample width
// are this design's choice.
module bin2rns #(
  parameter int K = 2,                  // number of moduli
  parameter int MODULI [K] = '{5, 7},   // the moduli set
  parameter int XW = 8,                 // input sample width
  parameter int RW = 3                  // residue width
) (
  input  logic signed [XW-1:0] x,
  output logic        [RW-1:0] r [K]
);

  for (genvar i = 0; i < K; i++) begin : g_mod
    localparam int MI = MODULI[i];
    logic signed [XW:0] rem;   // remainder, carries the sign of x

    if (2 ** RW < MI) begin : g_bad_width
      $error("bin2rns: RW too small for a modulus");
    end

    always_comb begin
      rem = (XW+1)'(x) % (XW+1)'(MI);
      if (rem < 0) rem = rem + (XW+1)'(MI);
      r[i] = RW'(rem);
    end
  end

endmodule
