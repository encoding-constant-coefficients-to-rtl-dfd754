// nr4sd_ref_pkg -- reference model used by the testbenches.
//
// It works on integers, independently of the RTL: an encoding is computed by
// repeated division (take B mod 4, pick the digit of the variant's set that is
// congruent to it, subtract, divide by 4), and a stored word is read back by
// summing digit * 4^j with the digit tables written out value by value.
package nr4sd_ref_pkg;

  // Value of a 2-bit low digit code; NR4SD- when plus == 0, NR4SD+ otherwise.
  function automatic int low_digit_value(bit plus, logic [1:0] code);
    if (!plus) begin
      case (code)
        2'b00: return 0;
        2'b01: return 1;
        2'b10: return -2;
        default: return -1;
      endcase
    end else begin
      case (code)
        2'b00: return 0;
        2'b01: return -1;
        2'b10: return 2;
        default: return 1;
      endcase
    end
  endfunction

  // Value of the 3-bit MB top digit code {s,two,one}; returns 99 for a code
  // that no valid word holds (one and two both set, or a negative zero).
  function automatic int mb_digit_value(logic [2:0] code);
    case (code)
      3'b000: return 0;
      3'b001: return 1;
      3'b010: return 2;
      3'b101: return -1;
      3'b110: return -2;
      default: return 99;
    endcase
  endfunction

  // Decode a stored word of n+1 bits (held in the low bits of w).
  function automatic longint decode_word(bit plus, int n, logic [64:0] w);
    longint v = 0;
    longint wt = 1;
    for (int j = 0; j < n / 2 - 1; j++) begin
      v += longint'(low_digit_value(plus, w[2*j +: 2])) * wt;
      wt *= 4;
    end
    v += longint'(mb_digit_value(w[n -: 3])) * wt;
    return v;
  endfunction

  // Reference digits of B: digits[j] for j = 0..n/2-1.
  typedef int digits_t [32];
  function automatic digits_t ref_digits(bit plus, int n, longint b);
    digits_t dg;
    longint r = b;
    for (int j = 0; j < 32; j++) dg[j] = 0;
    for (int j = 0; j < n / 2 - 1; j++) begin
      longint t = ((r % 4) + 4) % 4;   // 0..3
      int d;
      if (!plus) d = (t >= 2) ? int'(t) - 4 : int'(t);
      else       d = (t == 3) ? -1 : int'(t);
      dg[j] = d;
      r = (r - longint'(d)) / 4;
    end
    dg[n/2-1] = int'(r);
    return dg;
  endfunction

  // Reference word for B.
  function automatic logic [64:0] ref_word(bit plus, int n, longint b);
    digits_t dg = ref_digits(plus, n, b);
    logic [64:0] w = '0;
    for (int j = 0; j < n / 2 - 1; j++) begin
      case (dg[j])
        0:  w[2*j +: 2] = 2'b00;
        1:  w[2*j +: 2] = plus ? 2'b11 : 2'b01;
        2:  w[2*j +: 2] = 2'b10;
        -1: w[2*j +: 2] = plus ? 2'b01 : 2'b11;
        -2: w[2*j +: 2] = 2'b10;
        default: w[2*j +: 2] = 2'b00;
      endcase
    end
    case (dg[n/2-1])
      1:  w[n -: 3] = 3'b001;
      2:  w[n -: 3] = 3'b010;
      -1: w[n -: 3] = 3'b101;
      -2: w[n -: 3] = 3'b110;
      default: w[n -: 3] = 3'b000;
    endcase
    return w;
  endfunction

  // Quarter-wave sine coefficient, computed the same way the ROM documents it.
  function automatic longint sine_ref(int k, int depth, int n);
    real amp = real'((longint'(1) <<< (n - 1)) - 1);
    real x = amp * $sin(2.0 * 3.14159265358979323846 * k / (4.0 * depth));
    return longint'($rtoi($floor(x + 0.5)));
  endfunction

  // Random value in the n-bit two's complement range.
  function automatic longint rand_signed(int n);
    longint u = {$urandom(), $urandom()};
    longint lo = -(longint'(1) <<< (n - 1));
    u = u & ((longint'(1) <<< n) - 1);
    return u + lo;
  endfunction

endpackage
