// convolver_sector: one sector of the whole convolver, holding the same
// NTX stages of all P phases (a "convolver-slice" rather than a
// "phase-slice").
//
// The P rows of the sector are phase_sector instances. Unlike the phase-
// unit arrangement, the X-bus is not rotated from sector to sector: row rho
// always reads its weight slot d from global line (rho - d) mod P, so each
// row needs only the K lines rho, rho-1, ..., rho-K+1. Instead, the
// partial sums change rows: the sum leaving row rho enters row rho+1 (mod P)
// of the next sector. Phase R therefore occupies row (R + S - N + 1) mod P
// of sector S and climbs one row per sector, and every sector, weight
// connection and bus connection is identical along the convolver. All
// rows of one sector share the weights W_S .. W_{S-K+1}.
//
// Interface: s_in[rho] is the partial sum entering row rho; s_out[rho] is
// the partial sum leaving this sector towards row rho of the next sector
// (already permuted: it comes from row rho-1). Bus and weights as in
// phase_sector. Timing: NTX cycles from s_in to s_out, like one phase
// sector.
//
// The arrangement (fixed sample lines per row, cyclic phase permutation at
// sector interfaces, uniform weight connections) follows the document's
// convolver-slice scheme; building each row from the phase-sector module
// is this design's choice.
module convolver_sector #(
  parameter int NTX    = 2,
  parameter int NW     = 4,
  parameter int N      = 9,
  parameter int P      = 5,
  parameter int K      = 2,
  parameter int S      = 0,
  parameter bit SIGNED = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [P-1:0]         s_in,
  input  logic [P-1:0]         bus_x,
  input  logic [P-1:0]         bus_act,
  input  logic                 wclk,
  input  logic [K-1:0][NW-1:0] wsl,
  output logic [P-1:0]         s_out
);
  logic [P-1:0] row_out;

  for (genvar rho = 0; rho < P; rho++) begin : g_row
    // local line l of this row is global line (l + rho) mod P, so slot d
    // (local line -d) reads global line rho - d
    logic [P-1:0] lx, lact;
    logic [P-1:0] unused_x, unused_act;
    always_comb begin
      for (int l = 0; l < P; l++) begin
        lx[l]   = bus_x[(l + rho) % P];
        lact[l] = bus_act[(l + rho) % P];
      end
    end
    phase_sector #(
      .NTX(NTX), .NW(NW), .N(N), .P(P), .K(K), .S(S), .SIGNED(SIGNED)
    ) u_row (
      .clk(clk), .rst_n(rst_n), .s_in(s_in[rho]), .x_in(lx), .act_in(lact),
      .wclk(wclk), .wsl(wsl), .s_out(row_out[rho]),
      .x_out(unused_x), .act_out(unused_act)
    );
  end

  // cyclic phase permutation at the sector interface
  always_comb begin
    for (int rho = 0; rho < P; rho++) s_out[(rho + 1) % P] = row_out[rho];
  end
endmodule
