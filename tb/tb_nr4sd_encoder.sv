// tb_nr4sd_encoder -- self-checking test of the off-line NR4SD encoder.
//
// Both variants are checked exhaustively at N = 8 and N = 16 (the default
// width) and with random coefficients at N = 32.  For every coefficient the
// word must equal the reference encoding of nr4sd_ref_pkg (computed by
// division, not by the carry chain of the RTL), must decode back to the
// coefficient, and must use only valid digit codes.
module tb_nr4sd_encoder;
  import nr4sd_pkg::*;
  import nr4sd_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic signed [7:0]  b8;
  logic signed [15:0] b16;
  logic signed [31:0] b32;
  logic [8:0]  e8m, e8p;
  logic [16:0] e16m, e16p;
  logic [32:0] e32m, e32p;

  nr4sd_encoder #(.N(8),  .VARIANT(NR4SD_MINUS)) u8m  (.b(b8),  .enc(e8m));
  nr4sd_encoder #(.N(8),  .VARIANT(NR4SD_PLUS))  u8p  (.b(b8),  .enc(e8p));
  nr4sd_encoder                                  u16m (.b(b16), .enc(e16m));
  nr4sd_encoder #(.N(16), .VARIANT(NR4SD_PLUS))  u16p (.b(b16), .enc(e16p));
  nr4sd_encoder #(.N(32), .VARIANT(NR4SD_MINUS)) u32m (.b(b32), .enc(e32m));
  nr4sd_encoder #(.N(32), .VARIANT(NR4SD_PLUS))  u32p (.b(b32), .enc(e32p));

  task automatic check(string tag, bit plus, int n, longint b, logic [64:0] w);
    logic [64:0] exp_w = ref_word(plus, n, b);
    longint back = decode_word(plus, n, w);
    checks++;
    if (w != exp_w || back != b || mb_digit_value(w[n -: 3]) == 99) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s b=%0d word=%h expected=%h decodes to %0d", tag, b, w, exp_w, back);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++) begin
      b8 = 8'(i);
      #1;
      check("n8-",  1'b0, 8, longint'(i), 65'(e8m));
      check("n8+",  1'b1, 8, longint'(i), 65'(e8p));
    end
    for (int i = -32768; i < 32768; i++) begin
      b16 = 16'(i);
      #1;
      check("n16-", 1'b0, 16, longint'(i), 65'(e16m));
      check("n16+", 1'b1, 16, longint'(i), 65'(e16p));
    end
    for (int i = 0; i < 20000; i++) begin
      longint v;
      case (i)
        0: v = -(longint'(1) <<< 31);
        1: v = (longint'(1) <<< 31) - 1;
        2: v = -1;
        3: v = 0;
        default: v = rand_signed(32);
      endcase
      b32 = 32'(v);
      #1;
      check("n32-", 1'b0, 32, v, 65'(e32m));
      check("n32+", 1'b1, 32, v, 65'(e32p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
