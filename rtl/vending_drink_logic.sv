// vending_drink_logic: the gates that shrink the vending-machine ROM. Instead
// of feeding 10 drink selectors and 10 pressure sensors to the ROM, each
// selector is ANDed with its pressure sensor (a bottle is present) and the ten
// products are ORed into one "drink select" input. On the output side the
// single ROM "drink drink_latch" bit is ANDed with each selector to open the
// drink_latch latch of the chosen drink. Combinational. Gate structure follows the
// lecture's schematic.
module vending_drink_logic #(
  parameter int unsigned DRINKS = 10
) (
  input  logic [DRINKS-1:0] selector,
  input  logic [DRINKS-1:0] pressure,
  input  logic              drink_release,
  output logic              drink_select,
  output logic [DRINKS-1:0] drink_latch
);
  logic [DRINKS-1:0] stocked_sel;

  assign stocked_sel  = selector & pressure;   // 10 two-input ANDs
  assign drink_select = |stocked_sel;          // 10-input OR
  assign drink_latch      = selector & {DRINKS{drink_release}};  // latch ANDs
endmodule
