// nr4sd_premult_system -- a multiplier by constant coefficients built on
// pre-encoded NR4SD coefficients: the coefficient ROM and the multiplier.
//
// The coefficients (for instance the sine table of an FFT or the taps of a set
// of filters) never change, so they are encoded once, off-line, and stored in
// the ROM in pre-encoded NR4SD form, N+1 bits each.  At run time a request
// names a coefficient by its ROM address and supplies the variable operand a;
// the ROM word goes straight into the partial product generator of the
// multiplier, with no encoder in the path.
//
// Timing: a two-stage pipeline, one request per cycle.  Cycle 0: in_valid, a
// and coef_addr are presented; the ROM read and a's input register capture
// them.  Cycle 1: the multiplier works on the registered pair; the product
// register captures it.  Cycle 2: out_valid is high and p = a * COEF[coef_addr]
// (2N bits, signed).  Latency 2 cycles, throughput 1 per cycle; the pipeline
// registers are this design's choice.  rst_n is an asynchronous, active-low
// reset that clears out_valid and the registers.
module nr4sd_premult_system
  import nr4sd_pkg::*;
#(
  parameter int             N       = 16,           // operand width
  parameter int             DEPTH   = 64,           // coefficients in the ROM
  parameter nr4sd_variant_e VARIANT = NR4SD_MINUS,
  localparam int            AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [N-1:0]   a,
  input  logic [AW-1:0]         coef_addr,
  output logic                  out_valid,
  output logic signed [2*N-1:0] p
);

  logic [N:0]           b_enc;
  logic signed [N-1:0]  a_q;
  logic                 v_q;
  logic signed [2*N-1:0] p_d;

  coef_rom #(.N(N), .DEPTH(DEPTH), .VARIANT(VARIANT)) u_rom (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .addr (coef_addr),
    .data (b_enc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      v_q <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) a_q <= a;
    end
  end

  nr4sd_multiplier #(.N(N), .VARIANT(VARIANT)) u_mul (
    .a    (a_q),
    .b_enc(b_enc),
    .p    (p_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v_q;
      if (v_q) p <= p_d;
    end
  end

endmodule
