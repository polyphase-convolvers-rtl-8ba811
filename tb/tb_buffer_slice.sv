// tb_buffer_slice: every output must equal its input one cycle earlier.
module tb_buffer_slice;
  localparam int P = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, s_in, wclk_in, s_out, wclk_out;
  logic [P-1:0] x_in, act_in, x_out, act_out;
  int checks = 0, failures = 0;

  buffer_slice #(.P(P)) dut (.*);

  initial begin
    logic [2*P+1:0] prev;
    rst_n = 0; s_in = 0; wclk_in = 0; x_in = '0; act_in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    prev = '0;
    for (int t = 0; t < 200; t++) begin
      logic [2*P+1:0] v;
      v = (2*P+2)'({$urandom, $urandom});
      {s_in, wclk_in, x_in, act_in} <= v;
      @(posedge clk);
      #1;
      checks++;
      if ({s_out, wclk_out, x_out, act_out} !== v) begin
        failures++;
        if (failures < 10) $display("t=%0d out=%h expected %h", t, {s_out, wclk_out, x_out, act_out}, v);
      end
    end
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
