// const_adder: bit-serial addition of a constant to each output word.
//
// With two's-complement samples and weights each product is formed as an
// array of non-negative terms; the missing constant C_1 of every product is
// added here once per output word as C_N = N*C_1 (taken modulo 2^NY). The
// adder is a serial full adder whose second operand is bit i of C, selected
// by a bit counter restarted by y_start; the carry is cleared at each word
// start and no constant bits are added after the NY-th bit. With C = 0
// (unsigned operation) the word passes unchanged.
//
// Interface: y/y_start in, q/q_start out, LSB first. Timing: one cycle of
// latency; q_start follows y_start by one cycle.
//
// Adding N*C_1 once at the convolver output follows the document; the
// serial adder with its bit counter is this design's realisation of it.
module const_adder #(
  parameter int              NY = 10,
  parameter logic [NY-1:0]   C  = '0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic y,
  input  logic y_start,
  output logic q,
  output logic q_start
);
  localparam int CW = $clog2(NY + 1);

  logic [CW-1:0] cnt;      // index of the bit being added (NY = idle)
  logic          carry;
  logic [CW-1:0] idx;
  logic          cbit;
  logic          cin;

  always_comb begin
    idx  = y_start ? '0 : cnt;
    cbit = (int'(idx) < NY) ? C[(int'(idx) < NY) ? idx : '0] : 1'b0;
    cin  = y_start ? 1'b0 : carry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= CW'(NY);
      carry   <= 1'b0;
      q       <= 1'b0;
      q_start <= 1'b0;
    end else begin
      {carry, q} <= 2'(y) + 2'(cbit) + 2'(cin);
      q_start    <= y_start;
      if (int'(idx) < NY) cnt <= idx + 1'b1;
    end
  end
endmodule
