// coef_rom -- read-only table of constant coefficients, stored pre-encoded.
//
// Each of the DEPTH words is the N+1-bit pre-encoded NR4SD form of one
// coefficient (N/2-1 NR4SD digits of 2 bits and one MB digit of 3 bits),
// against 3N/2 bits for a table pre-encoded in Modified Booth form.  The
// contents are built at elaboration: one nr4sd_encoder per word, its input tied
// to the constant coefficient, so synthesis reduces each encoder to the stored
// constant and the ROM becomes a constant table in standard cells, as in the
// method this follows.  The coefficient set is a quarter-wave sine table
// (nr4sd_pkg::sine_coef), standing in for the FFT sine table or filter
// coefficients the method targets; the set and DEPTH are this design's choice.
//
// Interface and timing: synchronous read.  When en is high at a rising clk
// edge, data takes the word at addr (one cycle of latency); otherwise data
// holds.  addr values at or above DEPTH read as zero.  data resets to zero
// (the encoding of coefficient 0) on rst_n low.
module coef_rom
  import nr4sd_pkg::*;
#(
  parameter int             N       = 16,
  parameter int             DEPTH   = 64,
  parameter nr4sd_variant_e VARIANT = NR4SD_MINUS,
  localparam int            AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [N:0]    data
);

  logic [N:0] words [DEPTH];

  for (genvar k = 0; k < DEPTH; k++) begin : g_word
    localparam logic signed [N-1:0] COEF = N'(sine_coef(k, DEPTH, N));
    nr4sd_encoder #(.N(N), .VARIANT(VARIANT)) u_enc (
      .b  (COEF),
      .enc(words[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      data <= '0;
    else if (en)
      data <= (32'(addr) < DEPTH) ? words[addr] : '0;
  end

endmodule
