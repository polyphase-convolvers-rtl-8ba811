// tb_workloads: the configurations for which the phase count and output
// separation are tabulated: n_x = 5, n_w = 15, n' = 10 (n_y = 30) with
// sample separations n_px = 0, 1, 3, 5, 10, 24 and 25, giving 6, 5, 4, 3,
// 2, 2 and 1 phases with n_pym = 0, 0, 2, 0, 0, 28 and 0 idle bits between
// outputs; and the n_w = 2n_x, n' = n_x case (n_x = 4, n_w = 8, N = 16, 4
// phases, built as a chain of convolver sectors with phase permutation).
// N is kept small in the first family (n' is set to 10 directly)
// so the run stays short; the word length and timing are those of the
// tabulated case. Each harness checks every output word and its latency.
module tb_workloads;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NH = 8;
  logic [NH-1:0] done;
  int chk [NH];
  int fl  [NH];

  conv_harness #(.NX(5), .NW(15), .NP(10), .N(12), .NPX(0),  .NSAMP(40), .SEED(21), .SIGNED(1'b1))
    h0 (.clk(clk), .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  conv_harness #(.NX(5), .NW(15), .NP(10), .N(12), .NPX(1),  .NSAMP(40), .SEED(22))
    h1 (.clk(clk), .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  conv_harness #(.NX(5), .NW(15), .NP(10), .N(12), .NPX(3),  .NSAMP(40), .SEED(23), .SIGNED(1'b1))
    h2 (.clk(clk), .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  conv_harness #(.NX(5), .NW(15), .NP(10), .N(12), .NPX(5),  .NSAMP(40), .SEED(24))
    h3 (.clk(clk), .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  conv_harness #(.NX(5), .NW(15), .NP(10), .N(12), .NPX(10), .NSAMP(40), .SEED(25), .SIGNED(1'b1))
    h4 (.clk(clk), .done(done[4]), .checks(chk[4]), .failures(fl[4]));
  conv_harness #(.NX(5), .NW(15), .NP(10), .N(12), .NPX(24), .NSAMP(40), .SEED(26))
    h5 (.clk(clk), .done(done[5]), .checks(chk[5]), .failures(fl[5]));
  conv_harness #(.NX(5), .NW(15), .NP(10), .N(12), .NPX(25), .NSAMP(40), .SEED(27), .SIGNED(1'b1))
    h6 (.clk(clk), .done(done[6]), .checks(chk[6]), .failures(fl[6]));
  conv_harness #(.NX(4), .NW(8), .N(16), .NSAMP(80), .SEED(28), .SIGNED(1'b1), .SLICED(1'b1))
    h7 (.clk(clk), .done(done[7]), .checks(chk[7]), .failures(fl[7]));

  // phase counts the configurations must come out with
  localparam int EXP_P [NH] = '{6, 5, 4, 3, 2, 2, 1, 4};

  int checks, failures;

  initial begin
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin checks += chk[i]; failures += fl[i]; end
    checks += NH;
    if ($size(h0.y) != EXP_P[0]) failures++;
    if ($size(h1.y) != EXP_P[1]) failures++;
    if ($size(h2.y) != EXP_P[2]) failures++;
    if ($size(h3.y) != EXP_P[3]) failures++;
    if ($size(h4.y) != EXP_P[4]) failures++;
    if ($size(h5.y) != EXP_P[5]) failures++;
    if ($size(h6.y) != EXP_P[6]) failures++;
    if ($size(h7.y) != EXP_P[7]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: not all configurations finished (%b)", done);
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
