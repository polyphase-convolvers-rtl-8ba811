// tb_full_size: the convolver exactly as delivered (no parameter
// overrides: n_w=4, n_x=2, N=9, n_px=0, 5 phases, unsigned) convolving 200
// samples, every output word and its timing checked.
module tb_full_size;
  logic clk = 0;
  always #5 clk = ~clk;
  logic done;
  int checks, failures;

  conv_harness #(.NSAMP(200), .SEED(7), .DEFAULTS(1'b1)) h (
    .clk(clk), .done(done), .checks(checks), .failures(failures));

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
