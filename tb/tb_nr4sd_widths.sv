// tb_nr4sd_widths -- the system at the input widths the method is evaluated
// at (16, 24 and 32 bits), each with NR4SD- and NR4SD+ digits: every ROM
// coefficient is multiplied by the extreme and by random multiplicands.
module tb_nr4sd_widths;
  import nr4sd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NI = 6;
  logic done [NI];
  int   c [NI];
  int   f [NI];

  system_checker #(.N(16), .VARIANT(NR4SD_MINUS)) u16m (.clk(clk), .done(done[0]), .checks(c[0]), .failures(f[0]));
  system_checker #(.N(16), .VARIANT(NR4SD_PLUS))  u16p (.clk(clk), .done(done[1]), .checks(c[1]), .failures(f[1]));
  system_checker #(.N(24), .VARIANT(NR4SD_MINUS)) u24m (.clk(clk), .done(done[2]), .checks(c[2]), .failures(f[2]));
  system_checker #(.N(24), .VARIANT(NR4SD_PLUS))  u24p (.clk(clk), .done(done[3]), .checks(c[3]), .failures(f[3]));
  system_checker #(.N(32), .VARIANT(NR4SD_MINUS)) u32m (.clk(clk), .done(done[4]), .checks(c[4]), .failures(f[4]));
  system_checker #(.N(32), .VARIANT(NR4SD_PLUS))  u32p (.clk(clk), .done(done[5]), .checks(c[5]), .failures(f[5]));

  function automatic bit all_done();
    for (int i = 0; i < NI; i++) if (!done[i]) return 0;
    return 1;
  endfunction

  task automatic report(int extra_fail);
    int checks = 0;
    int failures = extra_fail;
    for (int i = 0; i < NI; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    // Let every checker clear its outputs before polling them.
    repeat (2) @(posedge clk);
    while (!all_done()) @(posedge clk);
    report(0);
    $finish;
  end
endmodule
