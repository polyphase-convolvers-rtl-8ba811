// tb_polyphase_convolver: end-to-end test of the convolver in several
// configurations at once: the default one (n_w=4, n_x=2, N=9, 5 phases),
// two's complement, a non-zero sample separation, buffer slices, a weight
// length that is not a multiple of the sample length, weights shorter than
// samples, and three of these again in the convolver-sector arrangement.
module tb_polyphase_convolver;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NH = 9;
  logic [NH-1:0] done;
  int chk [NH];
  int fl  [NH];

  conv_harness #(.NSAMP(120), .SEED(11), .DEFAULTS(1'b1)) h0 (
    .clk(clk), .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  conv_harness #(.NSAMP(120), .SEED(12), .SIGNED(1'b1)) h1 (
    .clk(clk), .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  conv_harness #(.NX(3), .NW(5), .NPX(2), .N(7), .NSAMP(80), .SEED(13), .SIGNED(1'b1)) h2 (
    .clk(clk), .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  conv_harness #(.NSAMP(80), .SEED(14), .BUF_EVERY(3), .SIGNED(1'b1)) h3 (
    .clk(clk), .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  conv_harness #(.NX(3), .NW(7), .N(5), .NSAMP(80), .SEED(15), .BUF_EVERY(2)) h4 (
    .clk(clk), .done(done[4]), .checks(chk[4]), .failures(fl[4]));
  conv_harness #(.NX(4), .NW(3), .N(6), .NSAMP(80), .SEED(16), .SIGNED(1'b1)) h5 (
    .clk(clk), .done(done[5]), .checks(chk[5]), .failures(fl[5]));
  conv_harness #(.NSAMP(120), .SEED(17), .SLICED(1'b1)) h6 (
    .clk(clk), .done(done[6]), .checks(chk[6]), .failures(fl[6]));
  conv_harness #(.NX(3), .NW(7), .N(5), .NSAMP(80), .SEED(18), .SIGNED(1'b1), .SLICED(1'b1)) h7 (
    .clk(clk), .done(done[7]), .checks(chk[7]), .failures(fl[7]));
  conv_harness #(.NX(3), .NW(5), .NPX(2), .N(7), .NSAMP(80), .SEED(19), .SLICED(1'b1)) h8 (
    .clk(clk), .done(done[8]), .checks(chk[8]), .failures(fl[8]));

  int checks, failures;

  initial begin
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin checks += chk[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NH; i++) begin checks += chk[i]; failures += fl[i]; end
    $display("watchdog: not all configurations finished (%b)", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
