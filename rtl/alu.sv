// alu: arithmetic logic unit of the processor. OUT = f(IN1, IN2) with
// f = add (fn = 0) or nand (fn = 1), and EQ = (IN1 == IN2) at all times, used
// to decide a branch. Combinational. The two functions and EQ follow the
// lecture; fn = 0 for add matches the control word shown for ADD, and fn = 1
// for nand is this design's encoding.
module alu
  import lc2kx_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  alu_fn_t      fn,
  output logic [W-1:0] out,
  output logic         eq
);
  always_comb begin
    unique case (fn)
      ALU_ADD:  out = in1 + in2;
      ALU_NAND: out = ~(in1 & in2);
    endcase
  end
  assign eq = (in1 == in2);
endmodule
