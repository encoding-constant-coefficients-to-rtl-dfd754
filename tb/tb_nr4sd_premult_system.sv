// tb_nr4sd_premult_system -- end-to-end test of the whole system at its
// default size (N = 16, 64 coefficients, NR4SD- digits).
//
// A random request stream (about three requests in four cycles, random
// multiplicands including the extremes, random ROM addresses) is driven into
// the system.  A scoreboard predicts every product from its own sine table and
// integer multiplication, and checks that it appears exactly two cycles after
// its request, with out_valid high then and low otherwise.  Halfway through, a
// reset is applied with requests in flight; they must be dropped.
//
// It also counts how often each mechanism of the design was used, taking the
// digits of each requested coefficient from the reference encoder: a negative
// NR4SD digit, the digit -2 (a 2A row), each nonzero value of the MB top
// digit, a coefficient of zero, a negative multiplicand, back-to-back requests
// and idle cycles.  A mechanism never used counts as a failure.
module tb_nr4sd_premult_system;
  import nr4sd_pkg::*;
  import nr4sd_ref_pkg::*;

  localparam int N = 16;
  localparam int DEPTH = 64;
  localparam int NREQ = 20000;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [N-1:0] a = '0;
  logic [5:0] coef_addr = '0;
  logic out_valid;
  logic signed [2*N-1:0] p;

  always #5 clk = ~clk;

  nr4sd_premult_system dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a),
    .coef_addr(coef_addr), .out_valid(out_valid), .p(p));

  // Scoreboard: expected product and the cycle it is due in.
  longint exp_p [$];
  longint exp_cyc [$];
  longint cyc = 0;

  int n_neg_digit = 0, n_two_row = 0, n_mb_one = 0, n_mb_two = 0;
  int n_zero_coef = 0, n_neg_a = 0, n_b2b = 0, n_idle = 0, n_reset_drop = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Output side: sample just after each edge.
  initial begin : mon
    forever begin
      @(posedge clk);
      #1;
      if (exp_cyc.size() > 0 && exp_cyc[0] == cyc) begin
        automatic longint e = exp_p.pop_front();
        void'(exp_cyc.pop_front());
        checks++;
        if (!out_valid || longint'(p) != e) begin
          failures++;
          if (failures <= 10)
            $display("FAIL cycle %0d: out_valid=%0b p=%0d expected %0d", cyc, out_valid, p, e);
        end
      end else begin
        checks++;
        if (out_valid && rst_n) begin
          failures++;
          if (failures <= 10) $display("FAIL cycle %0d: unexpected out_valid", cyc);
        end
      end
    end
  end

  initial begin
    repeat (4 * NREQ) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_mechanisms(longint c, longint x);
    digits_t dg = ref_digits(1'b0, N, c);
    bit neg = 0, two = 0;
    for (int j = 0; j < N / 2 - 1; j++) begin
      if (dg[j] < 0) neg = 1;
      if (dg[j] == -2) two = 1;
    end
    if (neg) n_neg_digit++;
    if (two) n_two_row++;
    if (dg[N/2-1] == 1) n_mb_one++;
    if (dg[N/2-1] == 2) n_mb_two++;
    if (c == 0) n_zero_coef++;
    if (x < 0) n_neg_a++;
  endtask

  initial begin : drive
    automatic bit prev_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NREQ; i++) begin
      @(negedge clk);
      if (i == NREQ / 2) begin
        // Reset with requests in flight: they are dropped.
        in_valid = 1'b1;
        a = 16'sd1234;
        coef_addr = 6'd5;
        @(negedge clk);
        in_valid = 1'b0;
        rst_n = 1'b0;
        n_reset_drop++;
        @(negedge clk);
        rst_n = 1'b1;
        @(negedge clk);
        prev_valid = 0;
      end
      if ($urandom_range(3) != 0) begin
        automatic int k = $urandom_range(DEPTH - 1);
        automatic longint x;
        case ($urandom_range(15))
          0: x = -32768;
          1: x = 32767;
          default: x = rand_signed(N);
        endcase
        in_valid = 1'b1;
        a = N'(x);
        coef_addr = 6'(k);
        if (i % 97 == 0) coef_addr = 6'd0;
        count_mechanisms(sine_ref(int'(coef_addr), DEPTH, N), x);
        exp_p.push_back(x * sine_ref(int'(coef_addr), DEPTH, N));
        exp_cyc.push_back(cyc + 2);
        if (prev_valid) n_b2b++;
        prev_valid = 1;
      end else begin
        in_valid = 1'b0;
        a = N'($urandom());          // ignored while in_valid is low
        coef_addr = 6'($urandom());
        n_idle++;
        prev_valid = 0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    #2;
    checks++;
    if (exp_p.size() != 0) begin
      failures++;
      $display("FAIL %0d products never appeared", exp_p.size());
    end
    $display("mechanisms: negative NR4SD digit %0d, 2A row %0d, MB top digit 1: %0d, MB top digit 2: %0d",
             n_neg_digit, n_two_row, n_mb_one, n_mb_two);
    $display("            zero coefficient %0d, negative multiplicand %0d, back-to-back %0d, idle %0d, reset in flight %0d",
             n_zero_coef, n_neg_a, n_b2b, n_idle, n_reset_drop);
    checks++; if (n_neg_digit == 0) begin failures++; $display("FAIL never: negative digit"); end
    checks++; if (n_two_row == 0) begin failures++; $display("FAIL never: 2A row"); end
    checks++; if (n_mb_one == 0) begin failures++; $display("FAIL never: MB top digit 1"); end
    checks++; if (n_mb_two == 0) begin failures++; $display("FAIL never: MB top digit 2"); end
    checks++; if (n_zero_coef == 0) begin failures++; $display("FAIL never: zero coefficient"); end
    checks++; if (n_neg_a == 0) begin failures++; $display("FAIL never: negative multiplicand"); end
    checks++; if (n_b2b == 0) begin failures++; $display("FAIL never: back-to-back requests"); end
    checks++; if (n_idle == 0) begin failures++; $display("FAIL never: idle cycle"); end
    checks++; if (n_reset_drop == 0) begin failures++; $display("FAIL never: reset in flight"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
