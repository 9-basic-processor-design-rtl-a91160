// register_file: the processor's small, fast storage. N entries of W bits with
// two read ports and one write port (LC2: 8 entries, 2 read, 1 write, so the
// register numbers R1, R2 and W are 3 bits). Reads are combinational, so an
// instruction can read and write back in the same cycle; the write happens at
// the rising clock edge when we is 1. A read of the register being written
// returns the old value. All entries reset to 0 (this design's choice); entry
// 0 is an ordinary register.
module register_file #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 32,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [IW-1:0] r1,
  input  logic [IW-1:0] r2,
  input  logic [IW-1:0] w,
  input  logic [W-1:0]  d,
  input  logic          we,
  output logic [W-1:0]  out1,
  output logic [W-1:0]  out2
);
  logic [W-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < N; i++) regs[i] <= '0;
    end else if (we) begin
      regs[w] <= d;
    end
  end

  assign out1 = regs[r1];
  assign out2 = regs[r2];
endmodule
