// tb_coef_rom -- self-checking test of the pre-encoded coefficient ROM.
//
// Reads every word of a default ROM (N = 16, 64 words, NR4SD-) and of an
// NR4SD+ ROM, in a shuffled order, and compares each with the reference
// encoding of the reference sine coefficient.  Also checks the one-cycle read
// latency, that data holds while en is low, and the reset value.
module tb_coef_rom;
  import nr4sd_pkg::*;
  import nr4sd_ref_pkg::*;

  localparam int N = 16;
  localparam int DEPTH = 64;
  localparam int WD = N + 1;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic [5:0] addr = '0;
  logic [N:0] dm, dp;

  always #5 clk = ~clk;

  coef_rom u_m (.clk(clk), .rst_n(rst_n), .en(en), .addr(addr), .data(dm));
  coef_rom #(.N(N), .DEPTH(DEPTH), .VARIANT(NR4SD_PLUS)) u_p (
    .clk(clk), .rst_n(rst_n), .en(en), .addr(addr), .data(dp));

  task automatic expect_eq(string tag, logic [N:0] got, logic [N:0] exp_w);
    checks++;
    if (got !== exp_w) begin
      failures++;
      if (failures <= 10) $display("FAIL %s got=%h expected=%h", tag, got, exp_w);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    automatic int order [DEPTH];
    for (int k = 0; k < DEPTH; k++) order[k] = (k * 37 + 11) % DEPTH;
    repeat (2) @(posedge clk);
    #1;
    expect_eq("reset m", dm, '0);
    expect_eq("reset p", dp, '0);
    rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      automatic int k = order[i];
      automatic longint c = sine_ref(k, DEPTH, N);
      @(negedge clk);
      en = 1'b1;
      addr = 6'(k);
      @(posedge clk);
      #1;
      // One cycle of latency: the word is there right after the edge.
      expect_eq($sformatf("m[%0d]", k), dm, WD'(ref_word(1'b0, N, c)));
      expect_eq($sformatf("p[%0d]", k), dp, WD'(ref_word(1'b1, N, c)));
      checks++;
      if (decode_word(1'b0, N, 65'(dm)) != c) begin
        failures++;
        $display("FAIL decode m[%0d]", k);
      end
    end
    // en low: the output holds while the address changes.
    @(negedge clk);
    en = 1'b0;
    addr = 6'd0;
    repeat (3) @(posedge clk);
    #1;
    expect_eq("hold", dm, WD'(ref_word(1'b0, N, sine_ref(order[DEPTH-1], DEPTH, N))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
