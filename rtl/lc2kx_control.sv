// lc2kx_control: the processor's control unit. The opcode (instruction bits
// 24-22) goes through a 3x8 decoder whose one-hot word line selects a row of
// the control ROM; the row is the control word that steers the datapath for
// that instruction. Purely combinational.
//
// The ADD row (dest mux 1, write-data mux 1, register En 1, ALU-B mux 1,
// ALU 0, memory En 0, R/W don't-care) is the one shown in the lecture; R/W is
// stored as 1 (read). The other rows are this design's, following the LC2K
// instruction set:
//   nand: as add with ALU function nand
//   lw  : dest = regB, write data from memory, ALU-B = offset, memory read
//   sw  : ALU-B = offset, memory write, no register write
//   beq : ALU compares regA and regB, branch bit set
//   jalr, halt, noop: nothing written; the PC advances by one
module lc2kx_control
  import lc2kx_pkg::*;
(
  input  opcode_t opcode,
  output ctrl_t   ctrl
);
  //                     dest wdat rfen alub fn mem rw br
  localparam ctrl_t C_ADD  = '{1'b1, 1'b1, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b1, 1'b0};
  localparam ctrl_t C_NAND = '{1'b1, 1'b1, 1'b1, 1'b1, ALU_NAND, 1'b0, 1'b1, 1'b0};
  localparam ctrl_t C_LW   = '{1'b0, 1'b0, 1'b1, 1'b0, ALU_ADD,  1'b1, 1'b1, 1'b0};
  localparam ctrl_t C_SW   = '{1'b0, 1'b0, 1'b0, 1'b0, ALU_ADD,  1'b1, 1'b0, 1'b0};
  localparam ctrl_t C_BEQ  = '{1'b0, 1'b0, 1'b0, 1'b1, ALU_ADD,  1'b0, 1'b1, 1'b1};
  localparam ctrl_t C_NONE = '{1'b0, 1'b0, 1'b0, 1'b0, ALU_ADD,  1'b0, 1'b1, 1'b0};

  // Row k of the ROM is the control word of opcode k.
  localparam logic [8*CTRL_W-1:0] CONTROL_ROM =
    {C_NONE, C_NONE, C_NONE, C_BEQ, C_SW, C_LW, C_NAND, C_ADD};

  logic [CTRL_W-1:0] word;

  rom #(.AW(3), .DW(CTRL_W), .CONTENTS(CONTROL_ROM)) u_rom (
    .addr (opcode),
    .data (word)
  );

  assign ctrl = ctrl_t'(word);
endmodule
