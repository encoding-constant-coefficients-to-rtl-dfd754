// tb_pp_tree -- self-checking test of the partial product accumulator.
//
// Random rows and correction bits at N = 8, 16 (default) and 32; the output
// must equal sum_j (value(pp[j]) + negc[j]) * 4^j taken modulo 2^(2N),
// computed here on integers.  All-ones and all-zero rows are included to
// exercise the longest carry chains.
module tb_pp_tree;

  int checks = 0;
  int failures = 0;

  logic [3:0][8:0]    pp8;
  logic [3:0]         nc8;
  logic [15:0]        p8;
  logic [7:0][16:0]   pp16;
  logic [7:0]         nc16;
  logic [31:0]        p16;
  logic [15:0][32:0]  pp32;
  logic [15:0]        nc32;
  logic [63:0]        p32;

  pp_tree #(.N(8))  u8  (.pp(pp8),  .negc(nc8),  .p(p8));
  pp_tree           u16 (.pp(pp16), .negc(nc16), .p(p16));
  pp_tree #(.N(32)) u32 (.pp(pp32), .negc(nc32), .p(p32));

  function automatic logic [63:0] ref_sum(int n, logic [16*33-1:0] rows, logic [15:0] nc);
    logic [63:0] s = '0;
    for (int j = 0; j < n / 2; j++) begin
      logic [63:0] r = '0;
      for (int b = 0; b < 64; b++)
        r[b] = rows[j*(n+1) + ((b < n + 1) ? b : n)];   // sign extend
      s += (r + 64'(nc[j])) << (2 * j);
    end
    return s;
  endfunction

  task automatic cmp(string tag, logic [63:0] got, logic [63:0] exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures <= 10) $display("FAIL %s got=%h expected=%h", tag, got, exp_v);
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
      logic [16*33-1:0] rnd;
      for (int k = 0; k < 17; k++) rnd[k*32 +: 32] = $urandom();
      if (i == 0) rnd = '1;
      if (i == 1) rnd = '0;
      pp8 = rnd[35:0];
      nc8 = (i == 0) ? '1 : 4'($urandom());
      pp16 = rnd[135:0];
      nc16 = (i == 0) ? '1 : 8'($urandom());
      pp32 = rnd[527:0];
      nc32 = (i == 0) ? '1 : 16'($urandom());
      #1;
      cmp("n8",  64'(p8),  ref_sum(8,  (16*33)'(pp8),  16'(nc8))  & 64'hFFFF);
      cmp("n16", 64'(p16), ref_sum(16, (16*33)'(pp16), 16'(nc16)) & 64'hFFFF_FFFF);
      cmp("n32", p32,      ref_sum(32, (16*33)'(pp32), nc32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
