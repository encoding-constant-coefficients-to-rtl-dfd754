// tb_nr4sd_multiplier -- self-checking test of the pre-encoded NR4SD multiplier.
//
// The coefficient word is produced by the reference encoder of nr4sd_ref_pkg
// and the product compared with a * B computed on integers.  Both variants:
// exhaustively at N = 8, randomly (with the extreme operands) at N = 16, 24
// and 32, the input widths the method is evaluated at.
module tb_nr4sd_multiplier;
  import nr4sd_pkg::*;
  import nr4sd_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic signed [7:0]  a8;   logic [8:0]  w8m,  w8p;  logic signed [15:0] p8m,  p8p;
  logic signed [15:0] a16;  logic [16:0] w16m, w16p; logic signed [31:0] p16m, p16p;
  logic signed [23:0] a24;  logic [24:0] w24m, w24p; logic signed [47:0] p24m, p24p;
  logic signed [31:0] a32;  logic [32:0] w32m, w32p; logic signed [63:0] p32m, p32p;

  nr4sd_multiplier #(.N(8))                        u8m  (.a(a8),  .b_enc(w8m),  .p(p8m));
  nr4sd_multiplier #(.N(8),  .VARIANT(NR4SD_PLUS)) u8p  (.a(a8),  .b_enc(w8p),  .p(p8p));
  nr4sd_multiplier                                 u16m (.a(a16), .b_enc(w16m), .p(p16m));
  nr4sd_multiplier #(.N(16), .VARIANT(NR4SD_PLUS)) u16p (.a(a16), .b_enc(w16p), .p(p16p));
  nr4sd_multiplier #(.N(24))                       u24m (.a(a24), .b_enc(w24m), .p(p24m));
  nr4sd_multiplier #(.N(24), .VARIANT(NR4SD_PLUS)) u24p (.a(a24), .b_enc(w24p), .p(p24p));
  nr4sd_multiplier #(.N(32))                       u32m (.a(a32), .b_enc(w32m), .p(p32m));
  nr4sd_multiplier #(.N(32), .VARIANT(NR4SD_PLUS)) u32p (.a(a32), .b_enc(w32p), .p(p32p));

  task automatic cmp(string tag, longint a, longint b, longint got);
    checks++;
    if (got != a * b) begin
      failures++;
      if (failures <= 10) $display("FAIL %s a=%0d b=%0d got=%0d expected=%0d", tag, a, b, got, a * b);
    end
  endtask

  function automatic longint pick(int n, int i);
    case (i % 64)
      0: return -(longint'(1) <<< (n - 1));
      1: return (longint'(1) <<< (n - 1)) - 1;
      2: return -1;
      3: return 0;
      default: return rand_signed(n);
    endcase
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -128; x < 128; x++) begin
      for (int y = -128; y < 128; y++) begin
        a8 = 8'(x);
        w8m = 9'(ref_word(1'b0, 8, longint'(y)));
        w8p = 9'(ref_word(1'b1, 8, longint'(y)));
        #1;
        cmp("n8-", longint'(x), longint'(y), longint'(p8m));
        cmp("n8+", longint'(x), longint'(y), longint'(p8p));
      end
    end
    for (int i = 0; i < 20000; i++) begin
      automatic longint x16 = pick(16, i);
      automatic longint y16 = pick(16, i / 64 + i);
      automatic longint x24 = pick(24, i);
      automatic longint y24 = pick(24, i / 64 + i);
      automatic longint x32 = pick(32, i);
      automatic longint y32 = pick(32, i / 64 + i);
      a16 = 16'(x16); w16m = 17'(ref_word(1'b0, 16, y16)); w16p = 17'(ref_word(1'b1, 16, y16));
      a24 = 24'(x24); w24m = 25'(ref_word(1'b0, 24, y24)); w24p = 25'(ref_word(1'b1, 24, y24));
      a32 = 32'(x32); w32m = 33'(ref_word(1'b0, 32, y32)); w32p = 33'(ref_word(1'b1, 32, y32));
      #1;
      cmp("n16-", x16, y16, longint'(p16m));
      cmp("n16+", x16, y16, longint'(p16p));
      cmp("n24-", x24, y24, longint'(p24m));
      cmp("n24+", x24, y24, longint'(p24p));
      cmp("n32-", x32, y32, p32m);
      cmp("n32+", x32, y32, p32p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
