// mult_stage: one bit-slice of a shared serial-parallel multiplier array.
//
// A stage holds one full adder, a sum flip-flop and a carry flip-flop. The
// sum flip-flops of consecutive stages form the shift path along which the
// partial convolved words travel, least significant bit first, one stage
// per clock; the carry flip-flop feeds the carry back into the same stage
// one clock later, where the next more significant bit of the same word is
// then being added. The third adder input is the OR of up to K AND gates,
// one per weight whose gate array overlaps this stage. Each gate combines a
// sample bit of its X-bus line with one bit of its weight. Only one line of
// the X-bus is active at a time, so the OR never merges two terms.
//
// In two's-complement mode (SIGNED=1) a gate output is inverted when its
// term carries exactly one sign bit: when the word clock (sample sign bit)
// is high and the weight bit is not the weight's sign bit, or the word clock
// is low and it is. A gate whose line is idle stays 0 in both modes.
//
// USED[d] tells whether slot d holds a real weight bit here, MSB[d] whether
// that bit is its weight's sign bit. Both are fixed at elaboration.
//
// The stage contents (gates, OR, one full adder, two flip-flops) follow the
// document's multiplier and shared-multiplier figures; the parameter masks
// and the active flag on each line are this design's own.
module mult_stage #(
  parameter int          K      = 2,
  parameter logic [K-1:0] USED  = '1,
  parameter logic [K-1:0] MSB   = '0,
  parameter bit          SIGNED = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s_in,   // partial sum bit from the previous stage
  input  logic [K-1:0] x,      // sample bit of the line of each slot
  input  logic [K-1:0] act,    // active flag of the line of each slot
  input  logic [K-1:0] w,      // weight bit of each slot
  input  logic         wclk,   // sign-bit word clock
  output logic         s_out   // registered partial sum bit
);
  logic [K-1:0] g;
  logic         gsum;
  logic         carry;

  always_comb begin
    for (int d = 0; d < K; d++) begin
      g[d] = USED[d] & act[d] &
             ((x[d] & w[d]) ^ (SIGNED & (wclk ^ MSB[d])));
    end
    gsum = |g;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_out <= 1'b0;
      carry <= 1'b0;
    end else begin
      {carry, s_out} <= 2'(s_in) + 2'(gsum) + 2'(carry);
    end
  end
endmodule
