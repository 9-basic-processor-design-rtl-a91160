// lecture9_top: the two designs of the lecture side by side, sharing only the
// clock and reset: the LC2Kx single-cycle processor (ports cpu_*) and the
// ROM-based vending-machine controller (ports vm_*). See lc2kx_cpu.sv and
// vending_controller.sv for their behaviour and timing.
module lecture9_top
  import lc2kx_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  // LC2Kx processor
  input  logic            cpu_load_en,
  input  logic [15:0]     cpu_load_addr,
  input  logic [XLEN-1:0] cpu_load_data,
  output logic [XLEN-1:0] cpu_pc,
  output logic [XLEN-1:0] cpu_instr,
  output ctrl_t           cpu_ctrl,
  output logic            cpu_branch_taken,
  // vending-machine controller
  input  logic            vm_coin,
  input  logic            vm_refund,
  input  logic [9:0]      vm_selector,
  input  logic [9:0]      vm_pressure,
  output logic [9:0]      vm_drink_latch,
  output logic            vm_coin_release,
  output logic [1:0]      vm_coins
);
  lc2kx_cpu u_cpu (
    .clk          (clk),
    .rst          (rst),
    .load_en      (cpu_load_en),
    .load_addr    (cpu_load_addr),
    .load_data    (cpu_load_data),
    .pc           (cpu_pc),
    .instr        (cpu_instr),
    .ctrl         (cpu_ctrl),
    .branch_taken (cpu_branch_taken)
  );

  vending_controller u_vm (
    .clk         (clk),
    .rst         (rst),
    .coin        (vm_coin),
    .refund      (vm_refund),
    .selector    (vm_selector),
    .pressure    (vm_pressure),
    .drink_latch (vm_drink_latch),
    .coin_release(vm_coin_release),
    .coins       (vm_coins)
  );
endmodule
