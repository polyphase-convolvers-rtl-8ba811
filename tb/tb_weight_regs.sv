// tb_weight_regs: writes random weights, reads them back from the parallel
// outputs, checks reset clearing, that an out-of-range address writes
// nothing, and that a write only lands on its own register.
module tb_weight_regs;
  localparam int NW = 5, N = 6, AW = $clog2(N);
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, we;
  logic [AW-1:0] waddr;
  logic [NW-1:0] wdata;
  logic [N-1:0][NW-1:0] w;
  logic [NW-1:0] model [N];
  int checks = 0, failures = 0;

  weight_regs #(.NW(NW), .N(N)) dut (.*);

  task automatic compare();
    for (int i = 0; i < N; i++) begin
      checks++;
      if (w[i] !== model[i]) begin
        failures++;
        $display("W_%0d = %h, expected %h", i, w[i], model[i]);
      end
    end
  endtask

  initial begin
    rst_n = 0; we = 0; waddr = '0; wdata = '0;
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 compare();
    rst_n <= 1;
    for (int t = 0; t < 60; t++) begin
      logic [AW-1:0] a;
      logic [NW-1:0] d;
      a = AW'($urandom_range(0, 7));
      d = NW'($urandom);
      we <= 1; waddr <= a; wdata <= d;
      @(posedge clk);
      if (int'(a) < N) model[a] = d;
      #1 compare();
    end
    we <= 0; waddr <= '0; wdata <= '1;
    @(posedge clk); #1 compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
