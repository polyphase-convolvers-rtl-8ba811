// tb_const_adder: serial words of NY=8 bits, LSB first, some back to back
// and some with idle bits between, must leave one cycle later as
// (word + C) mod 2^8, with the start strobe delayed by one cycle.
module tb_const_adder;
  localparam int NY = 8;
  localparam logic [NY-1:0] C = 8'hA7;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, y, y_start, q, q_start;
  int checks = 0, failures = 0;

  const_adder #(.NY(NY), .C(C)) dut (.*);

  logic [NY-1:0] expq[$];
  logic [NY-1:0] acc;
  int nb = -1;

  // collector
  always @(posedge clk) begin
    if (rst_n) begin
      if (q_start) begin nb = 0; acc = '0; end
      if (nb >= 0) begin
        acc[nb] = q;
        nb++;
        if (nb == NY) begin
          logic [NY-1:0] e;
          nb = -1;
          e = expq.pop_front();
          checks++;
          if (acc !== e) begin
            failures++;
            $display("word %h expected %h", acc, e);
          end
        end
      end
    end
  end

  initial begin
    rst_n = 0; y = 0; y_start = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 50; t++) begin
      logic [NY-1:0] v;
      int gap;
      v = NY'($urandom);
      if (t == 3) v = '1;
      gap = (t % 3 == 1) ? 3 : 0;
      expq.push_back(v + C);
      for (int j = 0; j < NY + gap; j++) begin
        y       <= (j < NY) ? v[j] : 1'($urandom);
        y_start <= (j == 0);
        @(posedge clk);
      end
    end
    y <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
