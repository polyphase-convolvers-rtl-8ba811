// sector_array: all P phases of the convolver built as one chain of
// convolver sectors (convolver_sector), as an alternative to P separate
// shared_phase units.
//
// The chain has NS = ceil(L / NTX) sectors, L = (N-1)*NTX + n_w stages,
// exactly as one phase of the phase-unit arrangement; each sector holds
// those stages for every phase. Partial sums enter as zero at the left of
// every row. Because the sums move up one row per sector, phase R leaves
// the last sector on row (R + NS - N) mod P; the outputs are reordered so
// that y[R] is always phase R (every Y_k with k mod P = R). The results and
// their timing are identical to those of the phase-unit arrangement: the
// LSB of Y_k is on y 1 + E cycles after X_k's LSB was on the bus, with
// E = NS*NTX - L, and y_start marks it.
//
// Interface: the global X-bus from sample_distributor, all weights, and
// per-phase serial outputs with LSB strobes.
//
// The sector chain with phase permutation follows the document's
// convolver-slice scheme; the output reordering and strobes are this
// design's own.
module sector_array
  import pc_pkg::*;
#(
  parameter int NX     = 2,
  parameter int NW     = 4,
  parameter int NPX    = 0,
  parameter int N      = 9,
  parameter int NP     = nprime_f(N),
  parameter int P      = pm_f(ny_f(NX, NW, NP), NX + NPX),
  parameter bit SIGNED = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [P-1:0]         bus_x,
  input  logic [P-1:0]         bus_act,
  input  logic [P-1:0]         bus_first,
  input  logic                 bus_wclk,
  input  logic [N-1:0][NW-1:0] w,
  output logic [P-1:0]         y,
  output logic [P-1:0]         y_start
);
  localparam int NTX = NX + NPX;
  localparam int K   = kov_f(NW, NTX);
  localparam int L   = (N - 1) * NTX + NW;
  localparam int NS  = (L + NTX - 1) / NTX;
  localparam int E   = NS * NTX - L;
  localparam int D   = 1 + E;

  logic [NS:0][P-1:0] sums;   // sums[s] enters sector s
  assign sums[0] = '0;

  for (genvar s = 0; s < NS; s++) begin : g_sec
    logic [K-1:0][NW-1:0] wsl;
    always_comb begin
      for (int d = 0; d < K; d++) begin
        wsl[d] = (s - d >= 0 && s - d < N) ? w[(s - d >= 0 && s - d < N) ? s - d : 0] : '0;
      end
    end
    convolver_sector #(
      .NTX(NTX), .NW(NW), .N(N), .P(P), .K(K), .S(s), .SIGNED(SIGNED)
    ) u_sec (
      .clk(clk), .rst_n(rst_n), .s_in(sums[s]), .bus_x(bus_x), .bus_act(bus_act),
      .wclk(bus_wclk), .wsl(wsl), .s_out(sums[s+1])
    );
  end

  // phase R left the last sector's row (R + NS - N) mod P, which the
  // permutation at its edge moved to index (R + NS - N + 1) mod P
  for (genvar r = 0; r < P; r++) begin : g_out
    localparam int ROW = (((r + NS - N + 1) % P) + P) % P;
    assign y[r] = sums[NS][ROW];

    logic [D:0] start_dly;
    assign start_dly[0] = bus_first[r];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) start_dly[D:1] <= '0;
      else        start_dly[D:1] <= start_dly[D-1:0];
    end
    assign y_start[r] = start_dly[D];
  end
endmodule
