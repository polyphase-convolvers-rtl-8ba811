// conv_harness: end-to-end stimulus and checker for polyphase_convolver.
//
// Loads N random weights, streams NSAMP random samples back to back (one
// every n_x+n_px cycles, random junk in the idle bits), collects the serial
// output words of every phase and compares each with a convolution computed
// here from the same numbers: Y_k = sum_i W_i * X_{k-N+1+i}, X_m = 0 for
// m < 0. In two's-complement mode only k >= N-1 is compared (earlier words
// lack the terms of samples that never arrived). It also checks that Y_k
// starts exactly LAT cycles after X_k, where LAT = 3 + E + NBUF is worked
// out from the array length (tk is the cycle X_k's LSB is driven onto x_in,
// tstart the clock edge at which the collector first sees Y_k's LSB, one
// edge after it appears, hence LAT + 1), and counts how often each mechanism occurred:
// words per phase, results wider than one product (headroom carries),
// negative results, ignored idle bits.
// SLICED selects the convolver-sector arrangement.
// DEFAULTS=1 instantiates the convolver with no parameter list at all.
module conv_harness #(
  parameter int NX        = 2,
  parameter int NW        = 4,
  parameter int NPX       = 0,
  parameter int N         = 9,
  parameter int NP        = (N <= 1) ? 0 : $clog2(N),
  parameter bit SIGNED    = 1'b0,
  parameter int BUF_EVERY = 0,
  parameter bit SLICED    = 1'b0,
  parameter int NSAMP     = 100,
  parameter int SEED      = 1,
  parameter bit DEFAULTS  = 1'b0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NY   = NX + NW + NP;
  localparam int NTX  = NX + NPX;
  localparam int P    = (NY + NTX - 1) / NTX;
  localparam int L    = (N - 1) * NTX + NW;
  localparam int NS   = (L + NTX - 1) / NTX;
  localparam int E    = NS * NTX - L;
  localparam int NBUF = (BUF_EVERY > 0) ? (NS - 1) / BUF_EVERY : 0;
  localparam int LAT  = 3 + E + NBUF;
  localparam int AW   = (N > 1) ? $clog2(N) : 1;

  logic          rst_n;
  logic          x_in, x_start;
  logic          w_we;
  logic [AW-1:0] w_addr;
  logic [NW-1:0] w_wdata;
  logic [P-1:0]  y, y_start;

  if (DEFAULTS) begin : g_def
    polyphase_convolver u_dut (
      .clk(clk), .rst_n(rst_n), .x_in(x_in), .x_start(x_start),
      .w_we(w_we), .w_addr(w_addr), .w_wdata(w_wdata), .y(y), .y_start(y_start));
  end else begin : g_par
    polyphase_convolver #(
      .NX(NX), .NW(NW), .NPX(NPX), .N(N), .NP(NP), .SIGNED(SIGNED), .BUF_EVERY(BUF_EVERY),
      .SLICED(SLICED)
    ) u_dut (
      .clk(clk), .rst_n(rst_n), .x_in(x_in), .x_start(x_start),
      .w_we(w_we), .w_addr(w_addr), .w_wdata(w_wdata), .y(y), .y_start(y_start));
  end

  longint wv   [N];
  longint xv   [NSAMP];
  longint tk   [NSAMP];
  longint cyc = 0;
  int     seed_state;
  int     words_per_phase [P];
  int     n_wide, n_neg, n_junk, n_done_words, n_expected;
  bit     started;

  // per-phase collectors
  longint acc   [P];
  int     nbits [P];
  bit     busy  [P];
  longint tstart[P];

  function automatic longint field(input longint raw, input int width, input bit sgn);
    longint v;
    v = raw & ((longint'(1) << width) - 1);
    if (sgn && v[width-1]) v = v - (longint'(1) << width);
    return v;
  endfunction

  function automatic longint ref_y(input int k);
    longint s = 0;
    for (int i = 0; i < N; i++) begin
      int m = k - N + 1 + i;
      if (m >= 0) s += wv[i] * xv[m];
    end
    return s;
  endfunction

  always_ff @(posedge clk) cyc <= cyc + 1;

  // number of outputs that will be compared
  initial begin
    n_expected = 0;
    for (int k = 0; k < NSAMP; k++) if (!SIGNED || k >= N - 1) n_expected++;
  end

  initial begin
    checks = 0; failures = 0; done = 0; started = 0;
    n_wide = 0; n_neg = 0; n_junk = 0; n_done_words = 0;
    rst_n = 0; x_in = 0; x_start = 0; w_we = 0; w_addr = '0; w_wdata = '0;
    seed_state = $urandom(SEED);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      wv[i] = field(longint'($urandom), NW, SIGNED);
      w_we <= 1; w_addr <= AW'(i); w_wdata <= NW'(wv[i]);
      @(posedge clk);
    end
    w_we <= 0;
    for (int k = 0; k < NSAMP; k++) xv[k] = field(longint'($urandom), NX, SIGNED);
    // a few extreme samples and weights
    if (NSAMP > N + 2) xv[N] = SIGNED ? -(longint'(1) << (NX - 1)) : (longint'(1) << NX) - 1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < NSAMP; k++) begin
      for (int j = 0; j < NTX; j++) begin
        if (j == 0) tk[k] = cyc;
        x_start <= (j == 0);
        if (j < NX) x_in <= xv[k][j];
        else begin
          x_in <= 1'($urandom);
          n_junk++;
        end
        started = 1;
        @(posedge clk);
      end
    end
    x_start <= 0;
    x_in    <= 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int r = 0; r < P; r++) begin
        if (y_start[r]) begin
          busy[r]   = 1;
          nbits[r]  = 0;
          acc[r]    = 0;
          tstart[r] = cyc;
        end
        if (busy[r]) begin
          acc[r] = acc[r] | (longint'(y[r]) << nbits[r]);
          nbits[r]++;
          if (nbits[r] == NY) begin
            int k;
            longint got, exp_v;
            busy[r] = 0;
            k = r + P * words_per_phase[r];
            words_per_phase[r]++;
            if (k < NSAMP && (!SIGNED || k >= N - 1)) begin
              got   = field(acc[r], NY, SIGNED);
              exp_v = ref_y(k);
              checks++;
              if (got !== exp_v) begin
                failures++;
                if (failures < 10)
                  $display("MISMATCH phase %0d Y_%0d got %0d expected %0d", r, k, got, exp_v);
              end
              checks++;
              if (tstart[r] - tk[k] != longint'(LAT + 1)) begin
                failures++;
                if (failures < 10)
                  $display("LATENCY phase %0d Y_%0d: %0d cycles, expected %0d", r, k,
                           tstart[r] - tk[k] - 1, LAT);
              end
              if (exp_v >= (longint'(1) << (NX + NW)) || exp_v < -(longint'(1) << (NX + NW - 2)))
                n_wide++;
              if (exp_v < 0) n_neg++;
              n_done_words++;
              if (n_done_words == n_expected) finish_report();
            end
          end
        end
      end
    end
  end

  task automatic finish_report();
    for (int r = 0; r < P; r++) begin
      checks++;
      if (words_per_phase[r] == 0) begin
        failures++;
        $display("phase %0d produced no word", r);
      end
    end
    checks++;
    if (n_wide == 0) begin failures++; $display("no result needed the headroom bits"); end
    if (SIGNED) begin
      checks++;
      if (n_neg == 0) begin failures++; $display("no negative result"); end
    end
    if (NPX > 0) begin
      checks++;
      if (n_junk == 0) begin failures++; $display("no idle bits"); end
    end
    $display("harness NX=%0d NW=%0d NPX=%0d N=%0d P=%0d SIGNED=%0d NBUF=%0d SLICED=%0d: words=%0d wide=%0d neg=%0d junk=%0d",
             NX, NW, NPX, N, P, SIGNED, NBUF, SLICED, n_done_words, n_wide, n_neg, n_junk);
    done = 1;
  endtask
endmodule
