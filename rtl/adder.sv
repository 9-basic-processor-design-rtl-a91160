// adder: W-bit adder, OUT = IN1 + IN2 modulo 2^W (carry out dropped).
// Combinational. The processor uses two: PC + 1 and (PC + 1) + offset for the
// branch target.
module adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  output logic [W-1:0] out
);
  assign out = in1 + in2;
endmodule
