// system_checker -- testbench helper: drives one nr4sd_premult_system of the
// given width and variant with every ROM address in turn, each with several
// random multiplicands, and compares each product, two cycles later, with
// a * sine coefficient computed on integers.  Reports its counts on done.
module system_checker
  import nr4sd_pkg::*;
  import nr4sd_ref_pkg::*;
#(
  parameter int             N       = 24,
  parameter int             DEPTH   = 64,
  parameter nr4sd_variant_e VARIANT = NR4SD_MINUS,
  parameter int             REPS    = 16
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int AW = $clog2(DEPTH);

  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [N-1:0] a = '0;
  logic [AW-1:0] addr = '0;
  logic out_valid;
  logic signed [2*N-1:0] p;

  nr4sd_premult_system #(.N(N), .DEPTH(DEPTH), .VARIANT(VARIANT)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a),
    .coef_addr(addr), .out_valid(out_valid), .p(p));

  longint exp_q [$];

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  // Check every product as it leaves the pipeline.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL N=%0d variant=%0d: product with no request", N, VARIANT);
      end else begin
        automatic longint e = exp_q.pop_front();
        if (longint'(p) != e) begin
          failures++;
          if (failures <= 5)
            $display("FAIL N=%0d variant=%0d: p=%0d expected %0d", N, VARIANT, p, e);
        end
      end
    end
  end

  initial begin : drive
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < DEPTH; k++) begin
      for (int r = 0; r < REPS; r++) begin
        automatic longint x = (r == 0) ? -(longint'(1) <<< (N - 1)) :
                              (r == 1) ? (longint'(1) <<< (N - 1)) - 1 : rand_signed(N);
        @(negedge clk);
        in_valid = 1'b1;
        a = N'(x);
        addr = AW'(k);
        exp_q.push_back(x * sine_ref(k, DEPTH, N));
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL N=%0d variant=%0d: %0d products missing", N, VARIANT, exp_q.size());
    end
    done = 1'b1;
  end
endmodule
