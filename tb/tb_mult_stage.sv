// tb_mult_stage: random test of one shared-multiplier stage in
// two's-complement mode with three gate slots: slot 0 an ordinary weight
// bit, slot 1 a weight sign bit, slot 2 unused. Only one line is active at
// a time, as on the real X-bus. The expected sum and carry come from an
// arithmetic model: term = x*w, replaced by 1 - x*w when exactly one of
// (word clock, weight sign bit) holds, and 0 for idle or unused slots.
module tb_mult_stage;
  localparam int K = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, s_in, wclk, s_out;
  logic [K-1:0] x, act, w;
  int checks = 0, failures = 0;
  int n_comp = 0, n_term = 0;

  mult_stage #(.K(K), .USED(3'b011), .MSB(3'b010), .SIGNED(1'b1)) dut (.*);

  int carry_m;
  initial begin
    rst_n = 0; s_in = 0; wclk = 0; x = '0; act = '0; w = '0;
    carry_m = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      int a, term, tot;
      bit comp;
      a = $urandom_range(0, 3);          // 3 = no line active
      s_in <= 1'($urandom); wclk <= 1'($urandom);
      x <= K'($urandom); w <= K'($urandom);
      act <= (a < 3) ? K'(1 << a) : '0;
      #1;
      term = 0;
      if (a < 2) begin
        comp = (a == 1) ^ wclk;
        term = x[a] & w[a];
        if (comp) begin term = 1 - term; n_comp++; end
        if (term != 0) n_term++;
      end
      tot = int'(s_in) + term + carry_m;
      @(posedge clk);
      carry_m = tot / 2;
      #1;
      checks++;
      if (s_out !== 1'(tot % 2)) begin
        failures++;
        if (failures < 10) $display("t=%0d s_out=%b expected %0d", t, s_out, tot % 2);
      end
    end
    checks++;
    if (n_comp == 0 || n_term == 0) failures++;
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
