// vending_controller: custom controller for a drink machine that takes
// quarters only and sells every drink at $0.75. The state is the number of
// quarters held (0..3) in a 2-bit register. Next state and outputs come from a
// 32-word, 4-bit ROM addressed by {state[1:0], coin, drink select, refund};
// the word is {next state[1:0], coin drink_latch, drink drink_latch}. The ROM is a
// 5x32 decoder driving word lines into an OR array (see rom.sv).
//
// Transitions (from the lecture's state diagram): a coin moves 0->1->2->3;
// refund from 1, 2 or 3 coins returns to 0 and opens the coin drink_latch latch;
// a stocked drink selection at 3 coins returns to 0 and opens that drink's
// latch; a selection of an empty slot at 3 coins stays at 3.
// This design's choices where the lecture is silent: refund at 0 coins does
// nothing; simultaneous inputs are served refund first, then drink select,
// then coin; a coin at 3 coins keeps the state and opens the coin drink_latch
// latch for that quarter; no drink is released below 3 coins.
//
// Timing: one input event per rising clock edge. Outputs are Mealy: they are
// valid in the cycle the input is present and last that one cycle. An
// immediate assertion checks that no drink is released below three coins.
module vending_controller #(
  parameter int unsigned DRINKS = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              coin,
  input  logic              refund,
  input  logic [DRINKS-1:0] selector,
  input  logic [DRINKS-1:0] pressure,
  output logic [DRINKS-1:0] drink_latch,
  output logic              coin_release,
  output logic [1:0]        coins
);
  // ROM word for one address, computed at elaboration from the rules above.
  function automatic logic [3:0] rom_word(logic [1:0] s, logic c, logic d, logic r);
    if (r)
      return (s == 2'd0) ? {2'd0, 1'b0, 1'b0} : {2'd0, 1'b1, 1'b0};
    if (d)
      return (s == 2'd3) ? {2'd0, 1'b0, 1'b1} : {s, 1'b0, 1'b0};
    if (c)
      return (s == 2'd3) ? {2'd3, 1'b1, 1'b0} : {s + 2'd1, 1'b0, 1'b0};
    return {s, 1'b0, 1'b0};
  endfunction

  function automatic logic [32*4-1:0] rom_image();
    logic [32*4-1:0] img;
    logic [4:0]      a;
    for (int k = 0; k < 32; k++) begin
      a = 5'(k);
      img[k*4 +: 4] = rom_word(a[4:3], a[2], a[1], a[0]);
    end
    return img;
  endfunction

  localparam logic [32*4-1:0] VEND_ROM = rom_image();

  logic       drink_select, drink_release;
  logic [1:0] next_coins;
  logic [3:0] rom_data;

  vending_drink_logic #(.DRINKS(DRINKS)) u_gates (
    .selector     (selector),
    .pressure     (pressure),
    .drink_release(drink_release),
    .drink_select (drink_select),
    .drink_latch  (drink_latch)
  );

  rom #(.AW(5), .DW(4), .CONTENTS(VEND_ROM)) u_rom (
    .addr({coins, coin, drink_select, refund}),
    .data(rom_data)
  );

  assign {next_coins, coin_release, drink_release} = rom_data;

  // No free drinks: a latch opens only when three quarters are held.
  always_comb if (!rst && |drink_latch) assert (coins == 2'd3) else $error("drink released with %0d coins", coins);

  register #(.W(2)) u_state (
    .clk(clk), .rst(rst), .en(1'b1), .d(next_coins), .q(coins)
  );
endmodule
