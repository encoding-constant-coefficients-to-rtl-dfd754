// nr4sd_encoder -- off-line encoder of a two's complement coefficient into the
// pre-encoded NR4SD form (see nr4sd_pkg for the word layout and digit codes).
//
// How it works: the coefficient is cut into K = N/2 radix-4 slices.  Walking
// from the least significant slice upwards, each slice value plus the incoming
// carry, d = 2*b[2j+1] + b[2j] + c (0..4), is mapped onto the variant's digit
// set: NR4SD- keeps 0 and 1 and turns 2, 3, 4 into -2, -1, 0 with a carry of 1;
// NR4SD+ keeps 0, 1, 2 and turns 3, 4 into -1, 0 with a carry of 1.  The top
// slice takes the sign weight, d = -2*b[N-1] + b[N-2] + c, which always lies in
// -2..+2 and is stored as a Modified Booth digit.  The sum of digit*4^j is B
// for every B in the N-bit range.
//
// The method (NR4SD digits, MB top digit, 2 bits per low digit, N+1 bits per
// coefficient) follows the pre-encoded NR4SD scheme; the ripple-carry
// formulation and the bit codes are this design's choice.  In the intended use
// the input is a constant (coef_rom ties it to a table entry), so synthesis
// folds the whole encoder into the stored bits: the encoding costs no hardware
// at run time.  It is purely combinational and can also be used on-line.
//
// Interface: b (N-bit signed coefficient) in, enc (N+1 bits) out.  No clock.
module nr4sd_encoder
  import nr4sd_pkg::*;
#(
  parameter int             N       = 16,          // coefficient width, even
  parameter nr4sd_variant_e VARIANT = NR4SD_MINUS
) (
  input  logic signed [N-1:0] b,
  output logic        [N:0]   enc
);

  localparam int K = N / 2;

  initial begin
    assert (N >= 4 && N % 2 == 0)
      else $fatal(1, "nr4sd_encoder: N must be even and at least 4");
  end

  always_comb begin
    logic       c;       // carry into the current slice
    logic [2:0] d;       // slice value plus carry, 0..4
    logic signed [2:0] dm; // MB top digit, -2..+2
    enc = '0;
    c   = 1'b0;
    for (int j = 0; j < K - 1; j++) begin
      d = {1'b0, b[2*j+1], b[2*j]} + {2'b00, c};
      if (VARIANT == NR4SD_MINUS) begin
        // 0 -> 0, 1 -> +1, 2 -> -2, 3 -> -1, 4 -> 0 (carry out on 2, 3, 4)
        c = (d >= 3'd2);
        unique case (d)
          3'd1:    enc[2*j +: 2] = 2'b01;
          3'd2:    enc[2*j +: 2] = 2'b10;
          3'd3:    enc[2*j +: 2] = 2'b11;
          default: enc[2*j +: 2] = 2'b00;
        endcase
      end else begin
        // 0 -> 0, 1 -> +1, 2 -> +2, 3 -> -1, 4 -> 0 (carry out on 3, 4)
        c = (d >= 3'd3);
        unique case (d)
          3'd1:    enc[2*j +: 2] = 2'b11;
          3'd2:    enc[2*j +: 2] = 2'b10;
          3'd3:    enc[2*j +: 2] = 2'b01;
          default: enc[2*j +: 2] = 2'b00;
        endcase
      end
    end
    // Most significant slice: sign-weighted, Modified Booth digit.  The 3-bit
    // signed value {b[N-1], b[N-1], b[N-2]} equals -2*b[N-1] + b[N-2].
    dm = $signed({b[N-1], b[N-1], b[N-2]}) + $signed({2'b00, c});
    enc[N]   = dm[2];                                    // sign
    enc[N-1] = (dm == 3'sd2) || (dm == -3'sd2);          // two
    enc[N-2] = (dm == 3'sd1) || (dm == -3'sd1);          // one
  end

endmodule
