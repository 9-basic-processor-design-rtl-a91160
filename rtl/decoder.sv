// decoder: N-to-2^N line decoder. Exactly one output line is active, the one
// whose number equals the binary input (for N = 3: input 011 drives 00001000).
// Combinational. Used as the word-line driver of a ROM (3x8 for the processor's
// control ROM, 5x32 for the vending-machine ROM). An immediate assertion
// checks that the output is one-hot.
module decoder #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0]      in_val,
  output logic [(2**N)-1:0] out_val
);
  always_comb begin
    out_val = '0;
    for (int unsigned i = 0; i < 2**N; i++)
      if (in_val == N'(i)) out_val[i] = 1'b1;
  end

  // Exactly one word line is active.
  always_comb assert ($onehot(out_val)) else $error("decoder output not one-hot");
endmodule
