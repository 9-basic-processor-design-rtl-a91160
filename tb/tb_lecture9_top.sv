// tb_lecture9_top: end-to-end test of both designs through the top, with all
// parameters at their defaults (65,536-word memories, 10 drinks).
//  - Processor: loads a program that multiplies 7 by 6 through repeated
//    addition, then uses nand to form -42 and 41, stores and reloads results,
//    and ends on a halt. Final registers and memory words are checked against
//    values computed by hand, and the run must take one cycle per instruction.
//  - Vending machine: at the same time, a customer sequence exercises every
//    rule of the controller, with every output checked each cycle.
// Each mechanism (each instruction kind, taken and untaken branches, coin,
// refund, drink release, empty slot, refused free drink, returned extra coin)
// is counted; one that never happened counts as a failure.
module tb_lecture9_top;
  import lc2kx_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 0, rst;
  logic        cpu_load_en, cpu_taken;
  logic [15:0] cpu_load_addr;
  logic [31:0] cpu_load_data, cpu_pc, cpu_instr;
  ctrl_t       cpu_ctrl;
  logic        vm_coin, vm_refund, vm_coin_release;
  logic [9:0]  vm_selector, vm_pressure, vm_drink_latch;
  logic [1:0]  vm_coins;

  lecture9_top dut (
    .clk(clk), .rst(rst),
    .cpu_load_en(cpu_load_en), .cpu_load_addr(cpu_load_addr), .cpu_load_data(cpu_load_data),
    .cpu_pc(cpu_pc), .cpu_instr(cpu_instr), .cpu_ctrl(cpu_ctrl), .cpu_branch_taken(cpu_taken),
    .vm_coin(vm_coin), .vm_refund(vm_refund), .vm_selector(vm_selector), .vm_pressure(vm_pressure),
    .vm_drink_latch(vm_drink_latch), .vm_coin_release(vm_coin_release), .vm_coins(vm_coins)
  );

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_add, n_nand, n_lw, n_sw, n_beq_taken, n_beq_not, n_noop;
  int n_coin, n_refund, n_drink, n_empty, n_free_refused, n_extra_coin;
  bit running;

  always @(posedge clk) if (running) begin
    case (opcode_t'(cpu_instr[24:22]))
      OP_ADD:  n_add++;
      OP_NAND: n_nand++;
      OP_LW:   n_lw++;
      OP_SW:   n_sw++;
      OP_BEQ:  if (cpu_taken) n_beq_taken++; else n_beq_not++;
      default: n_noop++;
    endcase
  end

  function automatic logic [31:0] enc(input int op, input int a, input int b, input int off);
    return (32'(op) << 22) | (32'(a) << 19) | (32'(b) << 16) | (32'(off) & 32'hffff);
  endfunction

  // ---------------- vending machine customer ----------------
  int m_coins;
  task automatic vm_event(input logic c, input logic r, input logic [9:0] s, input logic [9:0] p);
    logic       stocked, exp_cr;
    logic [9:0] exp_latch;
    int         next;
    vm_coin = c; vm_refund = r; vm_selector = s; vm_pressure = p;
    #1;
    stocked = |(s & p);
    exp_cr = 1'b0; exp_latch = '0; next = m_coins;
    if (r) begin
      exp_cr = (m_coins > 0); next = 0;
      if (m_coins > 0) n_refund++;
    end else if (stocked) begin
      if (m_coins == 3) begin exp_latch = s; next = 0; n_drink++; end
      else n_free_refused++;
    end else if (|s && m_coins == 3) begin
      n_empty++;
    end else if (c) begin
      if (m_coins == 3) begin exp_cr = 1'b1; n_extra_coin++; end
      else begin next = m_coins + 1; n_coin++; end
    end
    checks += 3;
    if (vm_coins !== 2'(m_coins)) begin failures++; $display("FAIL vm state %0d expected %0d", vm_coins, m_coins); end
    if (vm_coin_release !== exp_cr) begin failures++; $display("FAIL vm coin release %b", vm_coin_release); end
    if (vm_drink_latch !== exp_latch) begin failures++; $display("FAIL vm latch %b expected %b", vm_drink_latch, exp_latch); end
    @(posedge clk); #1;
    m_coins = next;
    vm_coin = 0; vm_refund = 0; vm_selector = 0;
  endtask

  task automatic vending_session();
    logic [9:0] full = '1;
    m_coins = 0;
    repeat (3) vm_event(1, 0, 0, full);                       // 75 cents
    vm_event(0, 0, 10'b00_0000_1000, full);                   // drink 3 released
    repeat (2) vm_event(1, 0, 0, full);
    vm_event(0, 0, 10'b00_0000_0100, full);                   // no free drink at 50 cents
    vm_event(0, 1, 0, full);                                  // refund 2 quarters
    repeat (3) vm_event(1, 0, 0, full);
    vm_event(0, 0, 10'b10_0000_0000, 10'b01_1111_1111);       // slot 9 empty: keep money
    vm_event(1, 0, 0, full);                                  // fourth quarter returned
    vm_event(0, 0, 10'b00_0010_0000, full);                   // drink 5 released
    vm_event(0, 1, 0, full);                                  // refund with nothing inserted
  endtask

  // ---------------- processor program ----------------
  // r1 = 7 (multiplicand), r2 = 6 (counter), r3 = -1, r4 = product
  localparam int HALT_PC  = 12;
  // 3 loads, 6 loop passes of 4 less the last back branch, 5 after the loop
  localparam int N_INSTR  = 3 + 6 * 4 - 1 + 5;

  initial begin
    int cycles;
    logic [31:0] image [32];
    rst = 1; running = 0;
    cpu_load_en = 0; cpu_load_addr = 0; cpu_load_data = 0;
    vm_coin = 0; vm_refund = 0; vm_selector = 0; vm_pressure = '1;
    foreach (image[i]) image[i] = '0;
    image[0]  = enc(2, 0, 1, 20);   // lw   r1 = 7
    image[1]  = enc(2, 0, 2, 21);   // lw   r2 = 6
    image[2]  = enc(2, 0, 3, 22);   // lw   r3 = -1
    image[3]  = enc(0, 4, 1, 4);    // loop: add r4 = r4 + r1
    image[4]  = enc(0, 2, 3, 2);    //       add r2 = r2 + r3
    image[5]  = enc(4, 2, 0, 1);    //       beq r2 r0 -> 7
    image[6]  = enc(4, 0, 0, -4);   //       beq r0 r0 -> 3
    image[7]  = enc(1, 4, 4, 5);    // nand r5 = ~r4        (= -43)
    image[8]  = enc(7, 0, 0, 0);    // noop
    image[9]  = enc(0, 5, 3, 6);    // add  r6 = r5 - 1     ... = -44
    image[10] = enc(3, 0, 4, 23);   // sw   mem[23] = r4
    image[11] = enc(2, 0, 7, 23);   // lw   r7 = mem[23]
    image[12] = enc(6, 0, 0, 0);    // halt
    image[20] = 32'd7;
    image[21] = 32'd6;
    image[22] = 32'hffff_ffff;
    // load the whole 65,536-word space (unused words zero)
    cpu_load_en = 1;
    for (int i = 0; i < 65536; i++) begin
      cpu_load_addr = 16'(i);
      cpu_load_data = (i < 32) ? image[i] : 32'd0;
      @(posedge clk); #1;
    end
    cpu_load_en = 0;
    @(posedge clk); #1;
    rst = 0; running = 1;

    fork
      vending_session();
      begin
        cycles = 0;
        while (cpu_pc != 32'(HALT_PC) && cycles < 1000) begin
          @(posedge clk); #1;
          cycles++;
        end
      end
    join
    running = 0;

    checks++;
    if (cycles != N_INSTR) begin failures++; $display("FAIL program took %0d cycles, expected %0d", cycles, N_INSTR); end
    checks += 8;
    if (dut.u_cpu.u_rf.regs[0] !== 32'd0)          begin failures++; $display("FAIL r0"); end
    if (dut.u_cpu.u_rf.regs[1] !== 32'd7)          begin failures++; $display("FAIL r1"); end
    if (dut.u_cpu.u_rf.regs[2] !== 32'd0)          begin failures++; $display("FAIL r2"); end
    if (dut.u_cpu.u_rf.regs[4] !== 32'd42)         begin failures++; $display("FAIL r4=%0d", dut.u_cpu.u_rf.regs[4]); end
    if (dut.u_cpu.u_rf.regs[5] !== 32'hffff_ffd5)  begin failures++; $display("FAIL r5=%h", dut.u_cpu.u_rf.regs[5]); end
    if (dut.u_cpu.u_rf.regs[6] !== 32'hffff_ffd4)  begin failures++; $display("FAIL r6=%h", dut.u_cpu.u_rf.regs[6]); end
    if (dut.u_cpu.u_rf.regs[7] !== 32'd42)         begin failures++; $display("FAIL r7=%0d", dut.u_cpu.u_rf.regs[7]); end
    if (dut.u_cpu.u_dmem.mem[23] !== 32'd42)       begin failures++; $display("FAIL mem[23]"); end

    $display("cpu: add %0d nand %0d lw %0d sw %0d beq taken %0d not taken %0d noop %0d",
             n_add, n_nand, n_lw, n_sw, n_beq_taken, n_beq_not, n_noop);
    $display("vending: coin %0d refund %0d drink %0d empty %0d free refused %0d extra coin %0d",
             n_coin, n_refund, n_drink, n_empty, n_free_refused, n_extra_coin);
    checks += 13;
    if (n_add == 0)          begin failures++; $display("FAIL no add"); end
    if (n_nand == 0)         begin failures++; $display("FAIL no nand"); end
    if (n_lw == 0)           begin failures++; $display("FAIL no lw"); end
    if (n_sw == 0)           begin failures++; $display("FAIL no sw"); end
    if (n_beq_taken == 0)    begin failures++; $display("FAIL no taken beq"); end
    if (n_beq_not == 0)      begin failures++; $display("FAIL no untaken beq"); end
    if (n_noop == 0)         begin failures++; $display("FAIL no noop"); end
    if (n_coin == 0)         begin failures++; $display("FAIL no coin"); end
    if (n_refund == 0)       begin failures++; $display("FAIL no refund"); end
    if (n_drink == 0)        begin failures++; $display("FAIL no drink"); end
    if (n_empty == 0)        begin failures++; $display("FAIL no empty slot"); end
    if (n_free_refused == 0) begin failures++; $display("FAIL no refused free drink"); end
    if (n_extra_coin == 0)   begin failures++; $display("FAIL no extra coin"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
