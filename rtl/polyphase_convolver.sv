// polyphase_convolver: serial-input, multi-output convolver
//   Y_k = sum_{i=0}^{N-1} W_i * X_{k-N+1+i}
// that keeps up with samples arriving back to back on a single bit-serial
// line.
//
// One output word Y_k is n_y = n_x + n_w + n' bits long but a sample only
// n_tx = n_x + n_px bits, so one output line cannot carry one result per
// sample when n_tx < n_y. The convolver therefore has P = ceil(n_y/n_tx)
// phases: phase r emits every Y_k with k mod P = r, one every P*n_tx
// cycles, with n_pym = P*n_tx - n_y idle bits in between. A sample
// distributor deals the samples cyclically onto a P-line X-bus; each phase
// (shared_phase) is a continuous full-adder array in which all N serial-
// parallel multiplications share stages, fed by the common weight
// registers (weight_regs). A serial constant adder (const_adder) on each
// output adds N*C_1 in two's-complement mode (SIGNED=1) and nothing
// otherwise. With SLICED=1 the same arrays are built instead as one chain
// of convolver sectors (sector_array), each holding the same stages of all
// phases, with the partial sums moving to the next row at every sector
// interface; results and timing are identical.
//
// Defaults: n_w = 4, n_x = 2, N = 9, n_px = 0, hence n' = 4, n_y = 10 and
// P = 5 phases with no idle bits between outputs.
//
// Interface:
//   x_in, x_start : serial samples, LSB first; x_start high on bit 0 of the
//                   first sample (and optionally of every later one). From
//                   then on one sample is taken every n_tx cycles; the n_px
//                   idle bits are ignored.
//   w_we, w_addr, w_wdata : weight write port (load before streaming).
//   y[r], y_start[r] : serial output of phase r, LSB first; y_start marks
//                   the LSB; n_y bits follow. In two's-complement mode the
//                   word is a signed n_y-bit number.
// Timing: the LSB of Y_k appears LATENCY = 3 + E + NBUF cycles after the
// LSB of X_k entered x_in (E and NBUF as in shared_phase; both 0 at the
// defaults). Outputs for k < N-1 hold only the terms of samples already
// received.
//
// The phase count, the shared-multiplier phases, the sample distributor,
// the shared weight registers and the output constant follow the document;
// the framing strobes, the weight write port and the buffer-slice
// placement parameter are this design's own. Buffer slices are provided
// only for the phase-unit arrangement (SLICED=0).
module polyphase_convolver
  import pc_pkg::*;
#(
  parameter int NX        = 2,
  parameter int NW        = 4,
  parameter int NPX       = 0,
  parameter int N         = 9,
  parameter int NP        = nprime_f(N),
  parameter bit SIGNED    = 1'b0,
  parameter int BUF_EVERY = 0,
  parameter bit SLICED    = 1'b0,
  localparam int NY  = ny_f(NX, NW, NP),
  localparam int NTX = NX + NPX,
  localparam int P   = pm_f(NY, NTX),
  localparam int AW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_in,
  input  logic          x_start,
  input  logic          w_we,
  input  logic [AW-1:0] w_addr,
  input  logic [NW-1:0] w_wdata,
  output logic [P-1:0]  y,
  output logic [P-1:0]  y_start
);
  localparam logic [NY-1:0] CN = SIGNED ? NY'(cn_f(NX, NW, N, NY)) : '0;

  logic [P-1:0]         bus_x, bus_act, bus_first;
  logic                 bus_wclk;
  logic [N-1:0][NW-1:0] w;

  sample_distributor #(.NX(NX), .NPX(NPX), .P(P)) u_dist (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .x_start(x_start),
    .bus_x(bus_x), .bus_act(bus_act), .bus_first(bus_first), .bus_wclk(bus_wclk)
  );

  weight_regs #(.NW(NW), .N(N)) u_wregs (
    .clk(clk), .rst_n(rst_n), .we(w_we), .waddr(w_addr), .wdata(w_wdata), .w(w)
  );

  logic [P-1:0] py, pstart;

  if (!SLICED) begin : g_units
    // phases as units: P independent shared-multiplier arrays
    for (genvar r = 0; r < P; r++) begin : g_phase
      shared_phase #(
        .NX(NX), .NW(NW), .NPX(NPX), .N(N), .NP(NP), .P(P), .R(r),
        .SIGNED(SIGNED), .BUF_EVERY(BUF_EVERY)
      ) u_phase (
        .clk(clk), .rst_n(rst_n),
        .bus_x(bus_x), .bus_act(bus_act), .bus_first(bus_first), .bus_wclk(bus_wclk),
        .w(w), .y(py[r]), .y_start(pstart[r])
      );
    end
  end else begin : g_sliced
    // one chain of convolver sectors with phase permutation
    sector_array #(
      .NX(NX), .NW(NW), .NPX(NPX), .N(N), .NP(NP), .P(P), .SIGNED(SIGNED)
    ) u_array (
      .clk(clk), .rst_n(rst_n),
      .bus_x(bus_x), .bus_act(bus_act), .bus_first(bus_first), .bus_wclk(bus_wclk),
      .w(w), .y(py), .y_start(pstart)
    );
  end

  for (genvar r = 0; r < P; r++) begin : g_out
    const_adder #(.NY(NY), .C(CN)) u_cadd (
      .clk(clk), .rst_n(rst_n), .y(py[r]), .y_start(pstart[r]),
      .q(y[r]), .q_start(y_start[r])
    );
  end

  initial begin
    assert (NP >= nprime_f(N)) else $error("NP must be at least ceil(log2 N)");
    assert (NY <= 63) else $error("output words are limited to 63 bits");
    assert (!(SLICED && BUF_EVERY > 0)) else $error("buffer slices exist only with phases as units");
  end
endmodule
