// nr4sd_pkg -- types and constants shared by the pre-encoded NR4SD multiplier.
//
// A coefficient B of N bits (N even, two's complement) is stored in a
// pre-encoded form of N+1 bits: K = N/2 radix-4 digits, of which the K-1 low
// digits are non-redundant signed digits (NR4SD) of 2 bits each and the most
// significant digit is a Modified Booth (MB) digit of 3 bits.  The MB top
// digit is what lets the form cover the whole two's complement range.
//
// Two NR4SD flavours exist; both keep four digit values:
//   NR4SD-  digits {-2,-1,0,+1}, code {n1,n0}, value = -2*n1 + n0
//   NR4SD+  digits {-1,0,+1,+2}, code {p1,p0}, value = +2*p1 - p0
// MB top digit {-2..+2}, code {s,two,one}, value = (s ? -1 : +1)*(2*two + one).
// Zero is always coded as all zeros.  The bit codes are this design's choice;
// the digit sets and the 2-bit / 3-bit field widths are those of the method.
//
// Word layout: enc[2j+1:2j] holds digit j for j = 0..K-2, enc[N:N-2] holds the
// MB digit.
package nr4sd_pkg;

  typedef enum logic {
    NR4SD_MINUS = 1'b0,  // low digits in {-2,-1,0,+1}
    NR4SD_PLUS  = 1'b1   // low digits in {-1,0,+1,+2}
  } nr4sd_variant_e;

  // One digit decoded into the three controls of a partial product row:
  // row = neg ? -(M) : M, with M = one ? A : two ? 2A : 0.
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } pp_ctrl_t;

  // Decode a 2-bit NR4SD digit code.
  function automatic pp_ctrl_t decode_nr4sd(nr4sd_variant_e variant, logic [1:0] code);
    pp_ctrl_t c;
    if (variant == NR4SD_MINUS) begin
      c.neg = code[1];                 // -2 (10) and -1 (11)
      c.two = code[1] & ~code[0];      // -2
      c.one = code[0];                 // +1 (01) and -1 (11)
    end else begin
      c.neg = code[0] & ~code[1];      // -1 (01)
      c.two = code[1] & ~code[0];      // +2 (10)
      c.one = code[0];                 // -1 (01) and +1 (11)
    end
    return c;
  endfunction

  // Decode the 3-bit MB most significant digit code {s,two,one}.
  function automatic pp_ctrl_t decode_mb(logic [2:0] code);
    pp_ctrl_t c;
    c.neg = code[2];
    c.two = code[1];
    c.one = code[0];
    return c;
  endfunction

  // Default coefficient table: a quarter wave of a sine, the kind of table an
  // FFT keeps for its twiddle factors.  Entry k of a DEPTH-entry table is
  // round((2^(N-1)-1) * sin(2*pi*k / (4*DEPTH))), so it stays inside N bits.
  function automatic longint sine_coef(int k, int depth, int n);
    real amp, x;
    amp = real'((64'sd1 <<< (n - 1)) - 1);
    x   = amp * $sin(2.0 * 3.14159265358979323846 * real'(k) / (4.0 * real'(depth)));
    return longint'($rtoi($floor(x + 0.5)));
  endfunction

endpackage
