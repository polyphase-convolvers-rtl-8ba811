// buffer_slice: a slice made only of flip-flops, one per signal.
//
// Buffer slices may be placed between ordinary sectors of a phase, for
// instance where the array crosses a chip boundary. They delay the partial
// sum line, every X-bus line (bit and active flag) and the word clock by
// one cycle together. Since the partial sums and the samples they meet are
// delayed alike, the arithmetic is unchanged; each buffer slice only adds
// one cycle to the latency of its phase. Weights are static and need no
// buffering.
//
// The slice content (one flip-flop per signal, no adders) follows the
// document; where buffer slices are placed is a parameter of shared_phase.
module buffer_slice #(
  parameter int P = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s_in,
  input  logic [P-1:0] x_in,
  input  logic [P-1:0] act_in,
  input  logic         wclk_in,
  output logic         s_out,
  output logic [P-1:0] x_out,
  output logic [P-1:0] act_out,
  output logic         wclk_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_out    <= 1'b0;
      x_out    <= '0;
      act_out  <= '0;
      wclk_out <= 1'b0;
    end else begin
      s_out    <= s_in;
      x_out    <= x_in;
      act_out  <= act_in;
      wclk_out <= wclk_in;
    end
  end
endmodule
