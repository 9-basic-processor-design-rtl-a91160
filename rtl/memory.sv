// memory: word-addressed storage with the lecture's interface: Addr, Datain,
// Dataout, En and R/W. The processor uses two of them, one for instructions and
// one for data, each holding the full 65,536-word address space.
// Timing (this design's choice, needed for one-cycle execution): when en is 1
// and rw is 1 (read), dataout shows the addressed word in the same cycle; when
// en is 1 and rw is 0 (write), datain is stored at the rising clock edge. With
// en at 0 dataout is 0 and nothing is stored. Contents are not reset.
module memory #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  datain,
  input  logic          en,
  input  logic          rw,
  output logic [W-1:0]  dataout
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en && !rw) mem[addr] <= datain;
  end

  assign dataout = (en && rw) ? mem[addr] : '0;
endmodule
