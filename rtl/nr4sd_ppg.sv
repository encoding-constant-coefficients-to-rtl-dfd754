// nr4sd_ppg -- partial product generator of the pre-encoded NR4SD multiplier.
//
// Each of the K = N/2 digits of the pre-encoded coefficient word selects one
// partial product row d_j * A.  A digit is decoded into three controls
// (nr4sd_pkg::decode_nr4sd / decode_mb): one selects A, two selects 2A, neg
// inverts.  Because an NR4SD digit has only four values and is stored on two
// bits, its decoding is simpler than that of a five-valued MB digit; only the
// top row uses MB decoding.
//
// Row j is N+1 bits wide and holds the bitwise complement of the selected
// multiple when neg is set: its two's complement value is d_j*A - neg_j.  The
// missing +1 of the negation is returned separately in negc[j], to be added at
// weight 4^j by the accumulator (pp_tree).  Rows are not shifted here.
//
// Interface: a (N-bit signed multiplicand), b_enc (N+1-bit pre-encoded
// coefficient) in; pp[j] (N+1 bits, signed), negc[j] out.  Combinational.
// The decoding follows the digit sets of the method; the row format with a
// separate correction bit is this design's choice.
module nr4sd_ppg
  import nr4sd_pkg::*;
#(
  parameter int             N       = 16,
  parameter nr4sd_variant_e VARIANT = NR4SD_MINUS,
  localparam int            K       = N / 2
) (
  input  logic signed [N-1:0]    a,
  input  logic        [N:0]      b_enc,
  output logic [K-1:0][N:0]      pp,
  output logic [K-1:0]           negc
);

  logic [N:0] a1;   // A  on N+1 bits (sign extended)
  logic [N:0] a2;   // 2A on N+1 bits

  assign a1 = {a[N-1], a};
  assign a2 = {a, 1'b0};

  for (genvar j = 0; j < K; j++) begin : g_row
    pp_ctrl_t ctl;
    if (j < K - 1) begin : g_nr4sd
      assign ctl = decode_nr4sd(VARIANT, b_enc[2*j +: 2]);
    end else begin : g_mb
      assign ctl = decode_mb(b_enc[N -: 3]);
    end
    assign pp[j]   = (({(N+1){ctl.one}} & a1) | ({(N+1){ctl.two}} & a2))
                     ^ {(N+1){ctl.neg}};
    assign negc[j] = ctl.neg;
  end

endmodule
