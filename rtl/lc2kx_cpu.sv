// lc2kx_cpu: single-cycle LC2Kx processor. Every instruction is fetched,
// decoded, executed and written back within one clock cycle; the rising edge
// then updates the PC, the register file and the data memory together.
//
// Datapath (as drawn in the lecture):
//   PC -> instruction memory -> instruction bits
//   bits 24-22 -> control (3x8 decoder + control ROM)
//   bits 21-19 -> register file R1, bits 18-16 -> R2
//   dest mux: 18-16 or 2-0 -> register file W
//   bits 15-0 -> sign extend
//   ALU: IN1 = OUT1, IN2 = ALU-B mux (sign-extended offset or OUT2)
//   data memory: Addr = ALU result, Datain = OUT2
//   write-data mux: data memory output or ALU result -> register file D
//   PC + 1 adder, branch adder (PC + 1) + offset, PC mux picks one of them.
// The PC mux select is (control branch bit AND ALU EQ), this design's choice.
// Opcodes beyond ADD follow the LC2K instruction set (add, nand, lw, sw, beq);
// jalr and halt have no path in this datapath and act as noop. Instruction
// bits 31-25 are not used by any instruction and are ignored.
//
// Program loading (this design's addition): hold rst high and pulse load_en
// with load_addr/load_data; the word is written into both the instruction and
// the data memory. Release rst to start at PC 0.
module lc2kx_cpu
  import lc2kx_pkg::*;
#(
  parameter int unsigned WORDS = 65536,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic            clk,
  input  logic            rst,
  // program load port
  input  logic            load_en,
  input  logic [AW-1:0]   load_addr,
  input  logic [XLEN-1:0] load_data,
  // observation
  output logic [XLEN-1:0] pc,
  output logic [XLEN-1:0] instr,
  output ctrl_t           ctrl,
  output logic            branch_taken
);
  instr_t          ir;
  logic [XLEN-1:0] pc_plus1, branch_target, pc_next;
  logic [XLEN-1:0] rf_out1, rf_out2, rf_wdata;
  logic [2:0]      rf_waddr;
  logic [XLEN-1:0] offset_se, alu_b, alu_out, dmem_out;
  logic            alu_eq;
  logic            loading;

  assign loading = rst && load_en;

  // ---------------- fetch ----------------
  register #(.W(XLEN)) u_pc (
    .clk(clk), .rst(rst), .en(1'b1), .d(pc_next), .q(pc)
  );

  memory #(.DEPTH(WORDS), .W(XLEN)) u_imem (
    .clk    (clk),
    .addr   (loading ? load_addr : pc[AW-1:0]),
    .datain (load_data),
    .en     (1'b1),
    .rw     (!loading),
    .dataout(instr)
  );
  assign ir = instr_t'(instr);

  adder #(.W(XLEN)) u_pc_inc (.in1(pc), .in2(XLEN'(1)), .out(pc_plus1));

  // ---------------- decode ----------------
  lc2kx_control u_ctrl (.opcode(ir.opcode), .ctrl(ctrl));

  mux2 #(.W(3)) u_dest_mux (
    .in1(ir.reg_b), .in2(ir.offset[2:0]), .sel(ctrl.dest_sel), .out(rf_waddr)
  );

  register_file #(.N(NREGS), .W(XLEN)) u_rf (
    .clk (clk),
    .rst (rst),
    .r1  (ir.reg_a),
    .r2  (ir.reg_b),
    .w   (rf_waddr),
    .d   (rf_wdata),
    .we  (ctrl.rf_en && !rst),
    .out1(rf_out1),
    .out2(rf_out2)
  );

  sign_extend #(.IN_W(16), .OUT_W(XLEN)) u_se (.in_val(ir.offset), .out_val(offset_se));

  // ---------------- execute ----------------
  mux2 #(.W(XLEN)) u_alub_mux (
    .in1(offset_se), .in2(rf_out2), .sel(ctrl.alub_sel), .out(alu_b)
  );

  alu #(.W(XLEN)) u_alu (
    .in1(rf_out1), .in2(alu_b), .fn(ctrl.alu_fn), .out(alu_out), .eq(alu_eq)
  );

  adder #(.W(XLEN)) u_br_add (.in1(pc_plus1), .in2(offset_se), .out(branch_target));

  // ---------------- memory ----------------
  memory #(.DEPTH(WORDS), .W(XLEN)) u_dmem (
    .clk    (clk),
    .addr   (loading ? load_addr : alu_out[AW-1:0]),
    .datain (loading ? load_data : rf_out2),
    .en     (loading || (ctrl.mem_en && !rst)),
    .rw     (loading ? 1'b0 : ctrl.mem_rw),
    .dataout(dmem_out)
  );

  // ---------------- write back / next PC ----------------
  mux2 #(.W(XLEN)) u_wdata_mux (
    .in1(dmem_out), .in2(alu_out), .sel(ctrl.wdata_sel), .out(rf_wdata)
  );

  assign branch_taken = ctrl.branch && alu_eq;

  mux2 #(.W(XLEN)) u_pc_mux (
    .in1(pc_plus1), .in2(branch_target), .sel(branch_taken), .out(pc_next)
  );
endmodule
