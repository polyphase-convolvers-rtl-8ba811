// tb_convolver_sector: a convolver sector with P = 3 rows, NTX = NW = 4 and
// a single weight, so each row is a complete serial-parallel multiplier.
// Row rho must read bus line rho only, and its result must leave on output
// index rho+1 mod 3 (phase permutation). Three numbers A_0..A_2 enter the
// three rows together while sample X is on line m; output rho+1 must then
// carry A_rho + W*X when rho = m and A_rho otherwise.
module tb_convolver_sector;
  localparam int NTX = 4, NW = 4, P = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, wclk;
  logic [P-1:0] s_in, s_out, bus_x, bus_act;
  logic [0:0][NW-1:0] wsl;
  int checks = 0, failures = 0;

  convolver_sector #(.NTX(NTX), .NW(NW), .N(1), .P(P), .K(1), .S(0)) dut (
    .clk, .rst_n, .s_in, .bus_x, .bus_act, .wclk, .wsl, .s_out);

  initial begin
    rst_n = 0; wclk = 0; s_in = '0; bus_x = '0; bus_act = '0; wsl = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 60; t++) begin
      int a [P];
      int got [P];
      int xv, wv, m;
      xv = $urandom_range(0, 15); wv = $urandom_range(0, 15); m = $urandom_range(0, P - 1);
      wsl[0] = NW'(wv);
      for (int r = 0; r < P; r++) begin a[r] = $urandom_range(0, 255); got[r] = 0; end
      for (int c = 0; c < NTX + 16; c++) begin
        for (int r = 0; r < P; r++) s_in[r] <= (c < 12) ? 1'((a[r] >> c) & 1) : 1'b0;
        bus_x <= '0; bus_act <= '0;
        if (c >= NTX - 1 && c < 2 * NTX - 1) begin
          bus_act[m] <= 1'b1;
          bus_x[m]   <= 1'((xv >> (c - NTX + 1)) & 1);
        end
        @(posedge clk);
        #1;
        if (c >= NTX - 1 && c < NTX + 11)
          for (int r = 0; r < P; r++) got[r] |= int'(s_out[(r + 1) % P]) << (c - NTX + 1);
      end
      for (int r = 0; r < P; r++) begin
        int e;
        e = a[r] + ((r == m) ? wv * xv : 0);
        checks++;
        if (got[r] != e) begin
          failures++;
          if (failures < 10) $display("row %0d line %0d: got %0d expected %0d", r, m, got[r], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
