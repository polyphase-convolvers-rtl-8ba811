// sample_distributor: cyclic distributor of the serial sample stream onto the
// P lines of the X-bus.
//
// Samples arrive on one serial line, least significant bit first, one every
// NTX = NX + NPX cycles: NX data bits followed by NPX idle bits whose values
// are ignored. Sample k is routed to line k mod P; all other lines carry zero.
// Each line also carries an "active" flag (high during the NX data bits of
// a sample on that line) and a "first" strobe (high on the least significant
// bit). One word clock, common to all lines, is high on the sign (last data)
// bit of every sample; it drives the two's-complement gate rule.
//
// The first x_start pulse after reset marks bit 0 of sample 0; from then on
// the distributor runs free with period NTX, since the phase arrays move
// their partial sums at a fixed pace and cannot absorb gaps. Later x_start
// pulses must fall on bit 0 (checked by an assertion).
//
// Timing: all outputs are registered, so a bit presented on x_in in cycle t
// appears on the bus in cycle t+1.
//
// The cyclic routing follows the distributor drawn in the convolver
// figures; the start strobe, the free-running counters, the active flags
// and the registered outputs are this design's own choices.
module sample_distributor #(
  parameter int NX  = 2,
  parameter int NPX = 0,
  parameter int P   = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x_in,     // serial sample bits, LSB first
  input  logic         x_start,  // high on bit 0 of a sample
  output logic [P-1:0] bus_x,    // per-line sample bit (0 when line idle)
  output logic [P-1:0] bus_act,  // per-line data-bit flag
  output logic [P-1:0] bus_first,// per-line LSB strobe
  output logic         bus_wclk  // sign-bit word clock
);
  localparam int NTX = NX + NPX;
  localparam int BW  = (NTX > 1) ? $clog2(NTX) : 1;
  localparam int LW  = (P > 1) ? $clog2(P) : 1;

  logic          running;
  logic [BW-1:0] bitcnt;
  logic [LW-1:0] line;

  logic          cur_run;
  logic [BW-1:0] cur_bit;
  logic [LW-1:0] cur_line;
  logic          cur_data;

  always_comb begin
    cur_run  = running | x_start;
    cur_bit  = running ? bitcnt : '0;
    cur_line = running ? line   : '0;
    cur_data = cur_run && (int'(cur_bit) < NX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      bitcnt    <= '0;
      line      <= '0;
      bus_x     <= '0;
      bus_act   <= '0;
      bus_first <= '0;
      bus_wclk  <= 1'b0;
    end else begin
      running <= cur_run;
      if (cur_run) begin
        if (int'(cur_bit) == NTX - 1) begin
          bitcnt <= '0;
          line   <= (int'(cur_line) == P - 1) ? '0 : cur_line + 1'b1;
        end else begin
          bitcnt <= cur_bit + 1'b1;
          line   <= cur_line;
        end
      end
      for (int l = 0; l < P; l++) begin
        bus_act[l]   <= cur_data && (int'(cur_line) == l);
        bus_x[l]     <= cur_data && (int'(cur_line) == l) && x_in;
        bus_first[l] <= cur_data && (int'(cur_line) == l) && (cur_bit == '0);
      end
      bus_wclk <= cur_data && (int'(cur_bit) == NX - 1);
    end
  end

  // once running, a start strobe may only mark bit 0 of a sample
  a_start_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (running && x_start) |-> (bitcnt == '0));

endmodule
