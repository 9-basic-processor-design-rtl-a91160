// register: W-bit register of rising-edge D flip-flops with a load enable and
// a synchronous, active-high reset to RESET_VAL. Serves as the program counter
// of the processor and as the 2-bit state of the vending-machine controller.
// Reset polarity and style are this design's choice.
module register #(
  parameter int unsigned   W         = 32,
  parameter logic [W-1:0]  RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VAL;
    else if (en) q <= d;
  end
endmodule
