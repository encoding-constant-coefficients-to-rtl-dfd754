// tb_nr4sd_ppg -- self-checking test of the partial product generator.
//
// Random multiplicands and random valid coefficient words (every digit code of
// the variant, every valid MB top digit code) for both variants at N = 16.
// Each row must satisfy value(pp[j]) + negc[j] == digit_j * a, with the digit
// value read from the word by the reference tables.  Extreme multiplicands
// (most negative, most positive, -1, 0) are included.
module tb_nr4sd_ppg;
  import nr4sd_pkg::*;
  import nr4sd_ref_pkg::*;

  localparam int N = 16;
  localparam int K = N / 2;

  int checks = 0;
  int failures = 0;

  logic signed [N-1:0] a;
  logic [N:0] w;
  logic [K-1:0][N:0] ppm, ppp;
  logic [K-1:0] ncm, ncp;

  nr4sd_ppg u_m (.a(a), .b_enc(w), .pp(ppm), .negc(ncm));
  nr4sd_ppg #(.N(N), .VARIANT(NR4SD_PLUS)) u_p (.a(a), .b_enc(w), .pp(ppp), .negc(ncp));

  localparam logic [2:0] MB_CODES [5] = '{3'b000, 3'b001, 3'b010, 3'b101, 3'b110};

  task automatic check_rows(bit plus, logic [K-1:0][N:0] pp, logic [K-1:0] nc);
    for (int j = 0; j < K; j++) begin
      longint d = (j < K - 1) ? longint'(low_digit_value(plus, w[2*j +: 2]))
                              : longint'(mb_digit_value(w[N -: 3]));
      longint got = longint'($signed(pp[j])) + longint'(nc[j]);
      checks++;
      if (got != d * longint'(a)) begin
        failures++;
        if (failures <= 10)
          $display("FAIL plus=%0d row %0d a=%0d digit=%0d got=%0d", plus, j, a, d, got);
      end
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
    for (int i = 0; i < 5000; i++) begin
      case (i % 50)
        0: a = {1'b1, {(N-1){1'b0}}};
        1: a = {1'b0, {(N-1){1'b1}}};
        2: a = '1;
        3: a = '0;
        default: a = N'($urandom());
      endcase
      w = (N+1)'($urandom());
      w[N -: 3] = MB_CODES[$urandom_range(4)];
      #1;
      check_rows(1'b0, ppm, ncm);
      check_rows(1'b1, ppp, ncp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
