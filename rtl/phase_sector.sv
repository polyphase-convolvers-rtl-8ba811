// phase_sector: one sector of a shared-multiplier phase, NTX stages wide.
//
// A phase is cut into sectors of NTX = n_x + n_px stages. Sector S holds
// the bits of the (up to) K = ceil(n_w/NTX) weights W_S, W_{S-1}, ...,
// W_{S-K+1} whose gate arrays cross it: stage u of the sector gets bit
// b = n_w-1 - d*NTX - u of weight W_{S-d} (d = 0..K-1), when that bit
// exists and 0 <= S-d < N. Weights are laid out most significant bit on
// the left, so a partial sum whose least significant bit meets bit 0 of a
// weight at the start of a sample receives exactly that product.
//
// The sector reads the X-bus in its own local numbering: slot d always
// uses local line (-d mod P). At its right edge the bus is rotated by one
// line (out[l] = in[l+1 mod P]), so all sectors of all phases are alike
// and only the bus entry point of each phase differs. This is the cyclic
// permutation of the sample busses at sector interfaces.
//
// Interface: s_in/s_out is the serial partial-sum line (s_out registered,
// NTX cycles behind s_in); x_in/act_in/wclk are the X-bus as seen by this
// sector; wsl[d] is W_{S-d} (ignored where that weight does not exist).
//
// Sector width, bus rotation and the weight-bit placement follow the
// document's modularity section; the formula-driven masks are this
// design's way of writing one sector module for every sector.
module phase_sector #(
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
  input  logic                 s_in,
  input  logic [P-1:0]         x_in,
  input  logic [P-1:0]         act_in,
  input  logic                 wclk,
  input  logic [K-1:0][NW-1:0] wsl,
  output logic                 s_out,
  output logic [P-1:0]         x_out,
  output logic [P-1:0]         act_out
);
  // weight bit index held by slot d at stage u (may fall outside 0..NW-1)
  function automatic int bit_of(input int u, input int d);
    return NW - 1 - d * NTX - u;
  endfunction

  function automatic logic [K-1:0] used_mask(input int u);
    logic [K-1:0] m;
    for (int d = 0; d < K; d++) begin
      m[d] = (bit_of(u, d) >= 0) && (bit_of(u, d) < NW) && (S - d >= 0) && (S - d < N);
    end
    return m;
  endfunction

  function automatic logic [K-1:0] msb_mask(input int u);
    logic [K-1:0] m;
    for (int d = 0; d < K; d++) m[d] = (bit_of(u, d) == NW - 1);
    return m;
  endfunction

  function automatic int line_of(input int d);
    return (P - (d % P)) % P;
  endfunction

  logic [NTX:0] chain;
  assign chain[0] = s_in;

  for (genvar u = 0; u < NTX; u++) begin : g_stage
    logic [K-1:0] sx, sact, sw;
    always_comb begin
      for (int d = 0; d < K; d++) begin
        sx[d]   = x_in[line_of(d)];
        sact[d] = act_in[line_of(d)];
        sw[d]   = (bit_of(u, d) >= 0 && bit_of(u, d) < NW) ? wsl[d][bit_of(u, d)] : 1'b0;
      end
    end
    mult_stage #(
      .K(K), .USED(used_mask(u)), .MSB(msb_mask(u)), .SIGNED(SIGNED)
    ) u_stage (
      .clk(clk), .rst_n(rst_n), .s_in(chain[u]),
      .x(sx), .act(sact), .w(sw), .wclk(wclk), .s_out(chain[u+1])
    );
  end

  assign s_out = chain[NTX];

  always_comb begin
    for (int l = 0; l < P; l++) begin
      x_out[l]   = x_in[(l + 1) % P];
      act_out[l] = act_in[(l + 1) % P];
    end
  end
endmodule
