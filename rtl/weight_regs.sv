// weight_regs: the static weight registers W_0 .. W_{N-1}.
//
// The convolver keeps its N weights in parallel form in registers that
// every phase reads; the gate arrays of the phases take their weight bits
// straight from these outputs. Weights are written one at a time through a
// synchronous write port (we, waddr, wdata) and are cleared by reset. A
// write takes effect on the next clock edge.
//
// Holding the weights in static registers shared by all phases follows the
// document; the write port and the reset value are this design's choice.
module weight_regs #(
  parameter int NW = 4,
  parameter int N  = 9,
  localparam int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic [NW-1:0]        wdata,
  output logic [N-1:0][NW-1:0] w       // w[i] = W_i
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w <= '0;
    end else if (we && (int'(waddr) < N)) begin
      w[waddr] <= wdata;
    end
  end
endmodule
