// lc2kx_pkg: shared types and constants of the LC2Kx single-cycle processor.
// Instruction fields: opcode [24:22], regA [21:19], regB [18:16],
// destReg [2:0], offset [15:0]. The control word is the data of the control
// ROM; its first seven fields are in the order the datapath drawing lists the
// control lines, the eighth (branch) is this design's addition for the PC mux.
package lc2kx_pkg;

  localparam int unsigned XLEN    = 32;  // datapath width
  localparam int unsigned NREGS   = 8;   // register-file entries

  // Opcodes: ADD = 000 is shown in the lecture; the rest follow the LC2K ISA.
  typedef enum logic [2:0] {
    OP_ADD  = 3'b000,
    OP_NAND = 3'b001,
    OP_LW   = 3'b010,
    OP_SW   = 3'b011,
    OP_BEQ  = 3'b100,
    OP_JALR = 3'b101,
    OP_HALT = 3'b110,
    OP_NOOP = 3'b111
  } opcode_t;

  typedef enum logic {
    ALU_ADD  = 1'b0,
    ALU_NAND = 1'b1
  } alu_fn_t;

  // Control word, most significant field first.
  typedef struct packed {
    logic    dest_sel;   // 0: regB field [18:16], 1: destReg field [2:0]
    logic    wdata_sel;  // 0: data memory output, 1: ALU result
    logic    rf_en;      // register-file write enable
    logic    alub_sel;   // 0: sign-extended offset, 1: regB contents
    alu_fn_t alu_fn;     // ALU function
    logic    mem_en;     // data memory enable
    logic    mem_rw;     // data memory 1: read, 0: write
    logic    branch;     // take (PC + 1 + offset) when the ALU reports EQ
  } ctrl_t;

  localparam int unsigned CTRL_W = $bits(ctrl_t);

  typedef struct packed {
    logic [31:25]     unused;
    opcode_t          opcode;
    logic [2:0]       reg_a;
    logic [2:0]       reg_b;
    logic [15:0]      offset;  // destReg is offset[2:0] for add and nand
  } instr_t;

endpackage
