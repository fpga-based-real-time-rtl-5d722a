// clock_counter: 64-bit free-running binary counter of fabric clock cycles.
//
// It is the time base of the real-time loop: the loop compares its deadline
// with this count to start every integration step exactly DT cycles after the
// previous one. The counter advances by one on every rising clock edge while
// ce is high and clears synchronously on reset. Q is registered, so it shows
// the number of enabled edges since reset. The 64-bit width follows the
// reference platform; the clock enable and reset are this design's additions.
module clock_counter #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (ce) q <= q + 1'b1;
  end
endmodule
