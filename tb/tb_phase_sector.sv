// tb_phase_sector: a sector with NTX = NW = 4 and a single weight is a
// complete serial-parallel multiplier. A serial number A enters s_in, LSB
// first, timed so that its LSB meets weight bit 0 (the last stage) when
// bit 0 of sample X is on the bus; it must leave on s_out as A + W*X. A
// second run uses a sector in the middle of a longer array with two
// overlapping weights on different lines. The bus leaving the sector must
// be the input bus rotated by one line.
module tb_phase_sector;
  localparam int NTX = 4, NW = 4, P = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  // DUT A: single weight, one sector of a one-term convolver
  logic                 s_in, s_out, wclk;
  logic [P-1:0]         x_in, act_in, x_out, act_out;
  logic [0:0][NW-1:0]   wsl;
  phase_sector #(.NTX(NTX), .NW(NW), .N(1), .P(P), .K(1), .S(0)) dut (
    .clk, .rst_n, .s_in, .x_in, .act_in, .wclk, .wsl, .s_out, .x_out, .act_out);

  // DUT B: NTX=2, NW=4 -> K=2 overlapping weights W_S (line 0) and W_{S-1} (line P-1)
  logic                 b_out;
  logic [P-1:0]         b_xo, b_ao;
  logic [1:0][NW-1:0]   wslb;
  phase_sector #(.NTX(2), .NW(NW), .N(9), .P(P), .K(2), .S(4)) dutb (
    .clk, .rst_n, .s_in, .x_in, .act_in, .wclk, .wsl(wslb), .s_out(b_out), .x_out(b_xo), .act_out(b_ao));

  // rotation check every cycle
  always @(negedge clk) begin
    for (int l = 0; l < P; l++) begin
      checks++;
      if (x_out[l] !== x_in[(l + 1) % P] || act_out[l] !== act_in[(l + 1) % P]) failures++;
    end
  end

  // run one multiply: A on s_in, X on bus line `line`, result read from `which` output
  task automatic run(input int a, input int xv, input int line, input int nst, input int which,
                     input int exp_v);
    int got;
    // s_in carries A starting at cycle 0; X starts at cycle nst-1 so that
    // A's LSB meets the last stage together with X's LSB
    got = 0;
    for (int c = 0; c < nst + 16; c++) begin
      s_in <= (c < 12) ? 1'((a >> c) & 1) : 1'b0;
      x_in <= '0; act_in <= '0;
      if (c >= nst - 1 && c < nst - 1 + NTX) begin
        act_in[line] <= 1'b1;
        x_in[line]   <= 1'((xv >> (c - nst + 1)) & 1);
      end
      @(posedge clk);
      #1;
      if (c >= nst - 1 && c < nst + 11)
        got |= int'(which == 0 ? s_out : b_out) << (c - nst + 1);
    end
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("A=%0d X=%0d line=%0d: got %0d expected %0d", a, xv, line, got, exp_v);
    end
  endtask

  initial begin
    rst_n = 0; s_in = 0; x_in = '0; act_in = '0; wclk = 0; wsl = '0; wslb = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 30; t++) begin
      int a, xv, wv;
      a = $urandom_range(0, 255); xv = $urandom_range(0, 15); wv = $urandom_range(0, 15);
      wsl[0] = NW'(wv);
      run(a, xv, 0, NTX, 0, a + wv * xv);          // line 0 is used
      run(a, xv, 1, NTX, 0, a);                    // line 1 is not
    end
    // sector B: stages hold W_4 bits 3,2 (line 0) and W_3 bits 1,0 (line P-1).
    // A number whose LSB meets W_3 bit 0 at the last stage gets W_3*X only
    // from the two low weight bits held here; W_3 bits 3,2 sit in sector 3.
    for (int t = 0; t < 30; t++) begin
      int a, xv, w3, w4;
      a = $urandom_range(0, 255); xv = $urandom_range(0, 3);
      w3 = $urandom_range(0, 15); w4 = $urandom_range(0, 15);
      wslb[0] = NW'(w4); wslb[1] = NW'(w3);
      run(a, xv, P - 1, 2, 1, a + (w3 % 4) * xv);
      // on line 0 the upper half of W_4 meets the number: bits 3,2 at
      // stages 0,1, so the LSB meets weight bit 2 at the last stage
      run(a, xv, 0, 2, 1, a + (w4 >> 2) * xv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
