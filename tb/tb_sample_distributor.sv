// tb_sample_distributor: checks the cyclic routing of samples onto the
// X-bus. Samples of NX=3 bits plus NPX=2 idle bits go to P=3 lines; the
// expected bus contents are derived from the test bench's own sample and
// bit counters, one cycle after each bit is driven. Later start strobes on
// bit 0 must not disturb the sequence.
module tb_sample_distributor;
  localparam int NX = 3, NPX = 2, P = 3, NTX = NX + NPX;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, x_in, x_start;
  logic [P-1:0] bus_x, bus_act, bus_first;
  logic bus_wclk;
  int checks = 0, failures = 0;

  sample_distributor #(.NX(NX), .NPX(NPX), .P(P)) dut (.*);

  // expected values for the next cycle
  logic [P-1:0] ex_x, ex_act, ex_first;
  logic ex_wclk;

  task automatic check();
    checks++;
    if (bus_x !== ex_x || bus_act !== ex_act || bus_first !== ex_first || bus_wclk !== ex_wclk) begin
      failures++;
      if (failures < 10)
        $display("bus mismatch: x=%b/%b act=%b/%b first=%b/%b wclk=%b/%b", bus_x, ex_x,
                 bus_act, ex_act, bus_first, ex_first, bus_wclk, ex_wclk);
    end
  endtask

  initial begin
    rst_n = 0; x_in = 0; x_start = 0;
    ex_x = '0; ex_act = '0; ex_first = '0; ex_wclk = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // idle cycles before the first start: nothing may appear
    for (int c = 0; c < 4; c++) begin
      x_in <= 1'($urandom);
      @(posedge clk); #1 check();
    end
    for (int k = 0; k < 40; k++) begin
      for (int j = 0; j < NTX; j++) begin
        logic b;
        b = 1'($urandom);
        x_in    <= b;
        x_start <= (j == 0) && (k == 0 || k % 7 == 3);
        @(posedge clk);
        ex_x = '0; ex_act = '0; ex_first = '0;
        ex_wclk = (j == NX - 1);
        if (j < NX) begin
          ex_act[k % P] = 1'b1;
          ex_x[k % P]   = b;
          ex_first[k % P] = (j == 0);
        end
        #1 check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
