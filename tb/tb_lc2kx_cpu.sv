// tb_lc2kx_cpu: runs the single-cycle processor at its full size (65,536-word
// memories) in three parts.
//  0. The lecture's example "add 1 2 3": r3 = r1 + r2, PC + 1, with the control
//     word 1 1 1 1 0 0 (dest mux, write-data mux, register En, ALU-B mux, ALU
//     function, memory En) while the add is in execution.
//  1. A directed program (sum 5+4+3+2+1 with a loop, then nand, sw, lw) whose
//     final register and memory values are worked out by hand; it must reach
//     its last instruction in exactly 24 cycles, one per instruction.
//  2. A random image (random instructions, random data, all 65,536 words)
//     executed for 4,000 cycles while an instruction-level reference model in
//     this testbench executes the same image (with separate instruction and
//     data memories, as in the design, so stores never change fetched code); PC and all eight registers are
//     compared after every cycle and the whole data memory at the end.
// Programs are written through the processor's load port while reset is held.
module tb_lc2kx_cpu;
  import lc2kx_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 0, rst, load_en, taken;
  logic [15:0] load_addr;
  logic [31:0] load_data, pc, instr;
  ctrl_t       ctrl;

  lc2kx_cpu dut (.clk(clk), .rst(rst), .load_en(load_en), .load_addr(load_addr),
                 .load_data(load_data), .pc(pc), .instr(instr), .ctrl(ctrl),
                 .branch_taken(taken));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----
  logic [31:0] m_mem [65536];   // image; also the model's data memory
  logic [31:0] m_imem [65536];  // instruction memory copy: stores do not reach it
  logic [31:0] m_reg [8];
  logic [31:0] m_pc;
  int          op_count [8];
  int          taken_count, not_taken_count;

  function automatic logic [31:0] enc(input int op, input int a, input int b, input int off);
    return (32'(op) << 22) | (32'(a) << 19) | (32'(b) << 16) | (32'(off) & 32'hffff);
  endfunction

  task automatic model_step();
    logic [31:0] ins, se, ra, rb;
    ins = m_imem[m_pc[15:0]];
    se  = {{16{ins[15]}}, ins[15:0]};
    ra  = m_reg[ins[21:19]];
    rb  = m_reg[ins[18:16]];
    op_count[ins[24:22]]++;
    case (ins[24:22])
      3'd0: begin m_reg[ins[2:0]] = ra + rb; m_pc = m_pc + 1; end
      3'd1: begin m_reg[ins[2:0]] = ~(ra & rb); m_pc = m_pc + 1; end
      3'd2: begin m_reg[ins[18:16]] = m_mem[16'(ra + se)]; m_pc = m_pc + 1; end
      3'd3: begin m_mem[16'(ra + se)] = rb; m_pc = m_pc + 1; end
      3'd4: begin
        if (ra == rb) begin m_pc = m_pc + 1 + se; taken_count++; end
        else begin m_pc = m_pc + 1; not_taken_count++; end
      end
      default: m_pc = m_pc + 1;  // jalr, halt, noop: no datapath action
    endcase
  endtask

  task automatic load_image(input int n);
    rst = 1; load_en = 1;
    for (int i = 0; i < n; i++) begin
      load_addr = 16'(i); load_data = m_mem[i]; m_imem[i] = m_mem[i];
      @(posedge clk); #1;
    end
    load_en = 0;
    @(posedge clk); #1;
    rst = 0;
    m_pc = 0;
    foreach (m_reg[i]) m_reg[i] = '0;
  endtask

  task automatic compare_state(input string tag);
    checks++;
    if (pc !== m_pc) begin failures++; $display("FAIL %s pc=%0d expected %0d", tag, pc, m_pc); end
    for (int r = 0; r < 8; r++) begin
      checks++;
      if (dut.u_rf.regs[r] !== m_reg[r]) begin
        failures++;
        $display("FAIL %s r%0d=%h expected %h", tag, r, dut.u_rf.regs[r], m_reg[r]);
      end
    end
  endtask

  initial begin
    int cycles;
    rst = 1; load_en = 0; load_addr = 0; load_data = 0;
    // ---- part 0: add 1 2 3 ----
    foreach (m_mem[i]) m_mem[i] = '0;
    m_mem[0] = enc(2, 0, 1, 10);   // lw  r1 = 1000
    m_mem[1] = enc(2, 0, 2, 11);   // lw  r2 = 234
    m_mem[2] = enc(0, 1, 2, 3);    // add 1 2 3
    m_mem[3] = enc(6, 0, 0, 0);    // halt
    m_mem[10] = 32'd1000;
    m_mem[11] = 32'd234;
    load_image(64);
    @(posedge clk); #1;
    @(posedge clk); #1;
    checks += 3;
    if (pc !== 32'd2) begin failures++; $display("FAIL add example: pc=%0d", pc); end
    if ({ctrl.dest_sel, ctrl.wdata_sel, ctrl.rf_en, ctrl.alub_sel, ctrl.alu_fn, ctrl.mem_en} !== 6'b111100)
      begin failures++; $display("FAIL add example: control word %b", ctrl); end
    @(posedge clk); #1;
    if (dut.u_rf.regs[3] !== 32'd1234 || pc !== 32'd3)
      begin failures++; $display("FAIL add example: r3=%0d pc=%0d", dut.u_rf.regs[3], pc); end

    // ---- part 1: directed program ----
    foreach (m_mem[i]) m_mem[i] = '0;
    m_mem[0] = enc(2, 0, 1, 20);   // lw   r1 = mem[20] = 5
    m_mem[1] = enc(2, 0, 2, 21);   // lw   r2 = mem[21] = -1
    m_mem[2] = enc(0, 3, 1, 3);    // add  r3 = r3 + r1
    m_mem[3] = enc(0, 1, 2, 1);    // add  r1 = r1 + r2
    m_mem[4] = enc(4, 0, 1, 1);    // beq  r0 r1 -> 6
    m_mem[5] = enc(4, 0, 0, -4);   // beq  r0 r0 -> 2
    m_mem[6] = enc(1, 3, 3, 4);    // nand r4 = ~(r3 & r3)
    m_mem[7] = enc(3, 0, 3, 22);   // sw   mem[22] = r3
    m_mem[8] = enc(2, 0, 5, 22);   // lw   r5 = mem[22]
    m_mem[9] = enc(6, 0, 0, 0);    // halt
    m_mem[20] = 32'd5;
    m_mem[21] = 32'hffff_ffff;
    load_image(65536);
    cycles = 0;
    while (pc != 32'd9 && cycles < 100) begin
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    if (cycles != 24) begin failures++; $display("FAIL directed program took %0d cycles, expected 24", cycles); end
    checks += 6;
    if (dut.u_rf.regs[1] !== 32'd0)          begin failures++; $display("FAIL r1=%h", dut.u_rf.regs[1]); end
    if (dut.u_rf.regs[2] !== 32'hffff_ffff)  begin failures++; $display("FAIL r2=%h", dut.u_rf.regs[2]); end
    if (dut.u_rf.regs[3] !== 32'd15)         begin failures++; $display("FAIL r3=%h", dut.u_rf.regs[3]); end
    if (dut.u_rf.regs[4] !== 32'hffff_fff0)  begin failures++; $display("FAIL r4=%h", dut.u_rf.regs[4]); end
    if (dut.u_rf.regs[5] !== 32'd15)         begin failures++; $display("FAIL r5=%h", dut.u_rf.regs[5]); end
    if (dut.u_dmem.mem[22] !== 32'd15)       begin failures++; $display("FAIL mem[22]=%h", dut.u_dmem.mem[22]); end

    // ---- part 2: random image against the reference model ----
    for (int i = 0; i < 65536; i++) begin
      if (i < 512) begin
        // mostly small offsets so branches stay in the code region
        m_mem[i] = enc($urandom() % 8, $urandom() % 8, $urandom() % 8,
                       ($urandom() % 4 == 0) ? int'($urandom()) : int'($urandom() % 16) - 8);
      end else begin
        m_mem[i] = $urandom();
      end
    end
    load_image(65536);
    foreach (op_count[i]) op_count[i] = 0;
    taken_count = 0; not_taken_count = 0;
    for (int c = 0; c < 4000; c++) begin
      model_step();
      @(posedge clk); #1;
      compare_state($sformatf("cycle %0d", c));
    end
    for (int i = 0; i < 65536; i++) begin
      if (dut.u_dmem.mem[i] !== m_mem[i]) begin
        failures++;
        if (failures < 10) $display("FAIL dmem[%0d]=%h expected %h", i, dut.u_dmem.mem[i], m_mem[i]);
      end
    end
    checks++;
    $display("random run: add %0d nand %0d lw %0d sw %0d beq taken %0d not taken %0d other %0d",
             op_count[0], op_count[1], op_count[2], op_count[3], taken_count, not_taken_count,
             op_count[5] + op_count[6] + op_count[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
