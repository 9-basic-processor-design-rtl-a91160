// mux2: two-input multiplexer, the basic steering element of the datapath.
// When sel is 0 the output is in1, otherwise it is in2. Purely combinational.
// The select rule follows the building-block description of the lecture's
// datapath; the width is a parameter (this design's choice, default 32).
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic         sel,
  output logic [W-1:0] out
);
  always_comb begin
    if (sel == 1'b0) out = in1;
    else             out = in2;
  end
endmodule
