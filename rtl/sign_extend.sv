// sign_extend: widens a two's-complement field by copying its most significant
// bit into every new upper bit: OUT(31:16) = IN(15), OUT(15:0) = IN(15:0) at
// the default sizes. Combinational. Used on the 16-bit offset field of the
// processor's instructions.
module sign_extend #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  in_val,
  output logic [OUT_W-1:0] out_val
);
  assign out_val = {{(OUT_W-IN_W){in_val[IN_W-1]}}, in_val};
endmodule
