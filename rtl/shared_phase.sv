// shared_phase: one phase of the polyphase convolver, built as a continuous
// array of full adders shared by all N multiplications (shared-multiplier
// scheme).
//
// Phase R produces every convolved output Y_k = sum_i W_i * X_{k-N+1+i}
// with k mod P = R. Its partial sums are born at the left end of the array
// as zero and travel right one stage per clock, LSB first, P*NTX bits apart.
// The gate array of weight W_i lies i*NTX stages further right than that of
// W_0, so a partial sum meets W_i exactly when the sample X_{k-N+1+i} it
// needs is on the X-bus; W_i therefore listens to bus line (R+i-N+1) mod P.
// Gate arrays of neighbouring weights overlap when n_w > NTX; overlapping
// gates always listen to different lines, so they share one full adder per
// stage through an OR. Carries stay inside each stage, so a word's headroom
// bits (n' of them) count the overflows of the accumulation. The array is
// L = (N-1)*NTX + n_w stages long, cut into NS = ceil(L/NTX) sectors
// (phase_sector); E = NS*NTX - L trailing stages only delay.
//
// Optional buffer slices (BUF_EVERY > 0: one after every BUF_EVERY sectors)
// re-time the partial sum and the bus together and add one cycle each.
//
// Interface: the global X-bus from sample_distributor, the weight registers,
// and a serial output y. y_start is high on the LSB of each output word;
// the n_y bits follow on consecutive cycles.
//
// Timing: the LSB of Y_k leaves on y exactly 1 + E + NBUF cycles after the
// LSB of X_k was on the bus, i.e. as soon as X_k's first bit arrives. One
// word leaves every P*NTX cycles.
//
// The array, its length, the weight spacing and the OR-shared adders
// follow the document's shared-multiplier scheme; the output strobe and
// the buffer placement parameter are this design's own.
module shared_phase
  import pc_pkg::*;
#(
  parameter int NX        = 2,
  parameter int NW        = 4,
  parameter int NPX       = 0,
  parameter int N         = 9,
  parameter int NP        = nprime_f(N),
  parameter int P         = pm_f(ny_f(NX, NW, NP), NX + NPX),
  parameter int R         = 0,
  parameter bit SIGNED    = 1'b0,
  parameter int BUF_EVERY = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [P-1:0]         bus_x,
  input  logic [P-1:0]         bus_act,
  input  logic [P-1:0]         bus_first,
  input  logic                 bus_wclk,
  input  logic [N-1:0][NW-1:0] w,
  output logic                 y,
  output logic                 y_start
);
  localparam int NTX  = NX + NPX;
  localparam int K    = kov_f(NW, NTX);
  localparam int L    = (N - 1) * NTX + NW;
  localparam int NS   = (L + NTX - 1) / NTX;
  localparam int E    = NS * NTX - L;
  localparam int NBUF = (BUF_EVERY > 0) ? (NS - 1) / BUF_EVERY : 0;
  localparam int OFF  = (((R - N + 1) % P) + P) % P;
  localparam int D    = 1 + E + NBUF;

  // sector s inputs
  logic [NS-1:0]        c_s;
  logic [NS-1:0][P-1:0] c_x, c_act;
  logic [NS-1:0]        c_wclk;
  // sector s outputs
  logic [NS-1:0]        o_s;
  logic [NS-1:0][P-1:0] o_x, o_act;

  // bus entry: local line l of sector 0 is global line (l + OFF) mod P
  always_comb begin
    c_s[0]    = 1'b0;
    c_wclk[0] = bus_wclk;
    for (int l = 0; l < P; l++) begin
      c_x[0][l]   = bus_x[(l + OFF) % P];
      c_act[0][l] = bus_act[(l + OFF) % P];
    end
  end

  for (genvar s = 0; s < NS; s++) begin : g_sec
    logic [K-1:0][NW-1:0] wsl;
    always_comb begin
      for (int d = 0; d < K; d++) begin
        wsl[d] = (s - d >= 0 && s - d < N) ? w[(s - d >= 0 && s - d < N) ? s - d : 0] : '0;
      end
    end

    phase_sector #(
      .NTX(NTX), .NW(NW), .N(N), .P(P), .K(K), .S(s), .SIGNED(SIGNED)
    ) u_sec (
      .clk(clk), .rst_n(rst_n),
      .s_in(c_s[s]), .x_in(c_x[s]), .act_in(c_act[s]), .wclk(c_wclk[s]),
      .wsl(wsl),
      .s_out(o_s[s]), .x_out(o_x[s]), .act_out(o_act[s])
    );

    if (s < NS - 1) begin : g_link
      if (BUF_EVERY > 0 && ((s + 1) % BUF_EVERY) == 0) begin : g_buf
        buffer_slice #(.P(P)) u_buf (
          .clk(clk), .rst_n(rst_n),
          .s_in(o_s[s]), .x_in(o_x[s]), .act_in(o_act[s]), .wclk_in(c_wclk[s]),
          .s_out(c_s[s+1]), .x_out(c_x[s+1]), .act_out(c_act[s+1]), .wclk_out(c_wclk[s+1])
        );
      end else begin : g_wire
        assign c_s[s+1]    = o_s[s];
        assign c_x[s+1]    = o_x[s];
        assign c_act[s+1]  = o_act[s];
        assign c_wclk[s+1] = c_wclk[s];
      end
    end
  end

  assign y = o_s[NS-1];

  // output word strobe: LSB strobe of line R, delayed to the array output
  logic [D:0] start_dly;
  assign start_dly[0] = bus_first[R];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start_dly[D:1] <= '0;
    else        start_dly[D:1] <= start_dly[D-1:0];
  end
  assign y_start = start_dly[D];

endmodule
