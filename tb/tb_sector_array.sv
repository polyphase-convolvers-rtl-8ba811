// tb_sector_array: all five phases of the default convolver (n_x=2, n_w=4,
// N=9) built as a chain of convolver sectors, driven by a bus model written
// here: sample k occupies line k mod 5 for two cycles with its active flag,
// an LSB strobe on its first bit and the word clock on its second. Output r
// must carry Y_k = sum W_i X_{k-8+i} for k = r, r+5, ..., each LSB exactly
// 1 cycle after X_k's LSB was on the bus.
module tb_sector_array;
  localparam int NX = 2, NW = 4, N = 9, P = 5, NY = 10, NS = 250;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [P-1:0] bus_x, bus_act, bus_first;
  logic bus_wclk;
  logic [N-1:0][NW-1:0] w;
  logic [P-1:0] y, y_start;
  int checks = 0, failures = 0;

  sector_array #(.NX(NX), .NW(NW), .N(N)) dut (.*);

  int xv [NS];
  longint tk [NS];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int nword [P];
  int nbit [P];
  longint acc [P];
  longint tstart [P];
  initial for (int r = 0; r < P; r++) begin nword[r] = 0; nbit[r] = -1; end
  always @(posedge clk) begin
    for (int r = 0; r < P; r++) begin
      if (y_start[r]) begin nbit[r] = 0; acc[r] = 0; tstart[r] = cyc; end
      if (nbit[r] >= 0) begin
        acc[r] |= longint'(y[r]) << nbit[r];
        nbit[r]++;
        if (nbit[r] == NY) begin
          int k;
          longint e;
          nbit[r] = -1;
          k = r + P * nword[r];
          nword[r]++;
          e = 0;
          for (int i = 0; i < N; i++) if (k - N + 1 + i >= 0) e += longint'(w[i]) * xv[k - N + 1 + i];
          checks += 2;
          if (acc[r] != e) begin failures++; $display("Y_%0d = %0d, expected %0d", k, acc[r], e); end
          if (tstart[r] - tk[k] != 2) begin failures++; $display("Y_%0d latency %0d", k, tstart[r] - tk[k]); end
        end
      end
    end
  end

  initial begin
    rst_n = 0; bus_x = '0; bus_act = '0; bus_first = '0; bus_wclk = 0; w = '0;
    for (int i = 0; i < N; i++) w[i] = NW'($urandom);
    for (int k = 0; k < NS; k++) xv[k] = $urandom_range(0, 3);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < NS; k++) begin
      for (int j = 0; j < NX; j++) begin
        if (j == 0) tk[k] = cyc;
        bus_x <= '0; bus_act <= '0; bus_first <= '0;
        bus_x[k % P]     <= 1'((xv[k] >> j) & 1);
        bus_act[k % P]   <= 1'b1;
        bus_first[k % P] <= (j == 0);
        bus_wclk         <= (j == NX - 1);
        @(posedge clk);
      end
    end
    bus_x <= '0; bus_act <= '0; bus_first <= '0; bus_wclk <= 0;
    repeat (30) @(posedge clk);
    for (int r = 0; r < P; r++) begin
      checks++;
      if (nword[r] < NS / P) begin failures++; $display("phase %0d: only %0d words", r, nword[r]); end
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
