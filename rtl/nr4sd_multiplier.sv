// nr4sd_multiplier -- pre-encoded NR4SD multiplier.
//
// Multiplies an N-bit two's complement operand a by a coefficient that arrives
// already encoded (b_enc, N+1 bits, from the coefficient ROM), so no encoding
// circuit sits in the datapath.  nr4sd_ppg turns the K = N/2 digits into K
// partial product rows (half the rows of a bit-level multiplier, as with
// Modified Booth) and pp_tree sums them.  p = a * B, where B is the value the
// word encodes, exactly, on 2N bits.
//
// Interface: a, b_enc in; p (2N bits, signed) out.  Combinational; the
// enclosing system registers the inputs and the output.
module nr4sd_multiplier
  import nr4sd_pkg::*;
#(
  parameter int             N       = 16,
  parameter nr4sd_variant_e VARIANT = NR4SD_MINUS
) (
  input  logic signed [N-1:0]   a,
  input  logic        [N:0]     b_enc,
  output logic signed [2*N-1:0] p
);

  localparam int K = N / 2;

  logic [K-1:0][N:0] pp;
  logic [K-1:0]      negc;

  nr4sd_ppg #(.N(N), .VARIANT(VARIANT)) u_ppg (
    .a    (a),
    .b_enc(b_enc),
    .pp   (pp),
    .negc (negc)
  );

  pp_tree #(.N(N)) u_tree (
    .pp  (pp),
    .negc(negc),
    .p   (p)
  );

endmodule
