// tb_vending_controller: drives the vending-machine controller with directed
// scenarios (buy a drink, refund, empty slot, free-drink attempt, extra coin)
// and then random input events, comparing state and outputs every cycle with
// a reference model of the machine's rules kept in the testbench.
module tb_vending_controller;
  int checks = 0, failures = 0;
  logic       clk = 0, rst, coin, refund, coin_rel;
  logic [9:0] sel, pres, latch;
  logic [1:0] coins;
  int         m_coins;

  vending_controller dut (.clk(clk), .rst(rst), .coin(coin), .refund(refund), .selector(sel),
                          .pressure(pres), .drink_latch(latch), .coin_release(coin_rel),
                          .coins(coins));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one event for one cycle and check the outputs and the next state.
  task automatic event_(input logic c, input logic r, input logic [9:0] s, input logic [9:0] p);
    logic       stocked, exp_coin_rel;
    logic [9:0] exp_latch;
    int         next;
    coin = c; refund = r; sel = s; pres = p;
    #1;
    stocked = |(s & p);
    exp_coin_rel = 1'b0; exp_latch = '0; next = m_coins;
    if (r) begin
      exp_coin_rel = (m_coins > 0); next = 0;
    end else if (stocked) begin
      if (m_coins == 3) begin exp_latch = s; next = 0; end
    end else if (c) begin
      if (m_coins == 3) exp_coin_rel = 1'b1; else next = m_coins + 1;
    end
    checks += 3;
    if (coins !== 2'(m_coins)) begin failures++; $display("FAIL state %0d expected %0d", coins, m_coins); end
    if (coin_rel !== exp_coin_rel) begin failures++; $display("FAIL coin_release %b in state %0d c=%b r=%b", coin_rel, m_coins, c, r); end
    if (latch !== exp_latch) begin failures++; $display("FAIL latch %b expected %b", latch, exp_latch); end
    @(posedge clk); #1;
    m_coins = next;
  endtask

  initial begin
    rst = 1; coin = 0; refund = 0; sel = 0; pres = '1;
    @(posedge clk); #1;
    rst = 0; m_coins = 0;
    // buy a drink from slot 4
    event_(1, 0, 0, '1); event_(1, 0, 0, '1); event_(1, 0, 0, '1);
    event_(0, 0, 10'b00_0001_0000, '1);
    // no free drink at 2 coins, then refund
    event_(1, 0, 0, '1); event_(1, 0, 0, '1);
    event_(0, 0, 10'b00_0000_0001, '1);
    event_(0, 1, 0, '1);
    // empty slot at 3 coins keeps the money, extra coin returned
    event_(1, 0, 0, '1); event_(1, 0, 0, '1); event_(1, 0, 0, '1);
    event_(0, 0, 10'b10_0000_0000, 10'b01_1111_1111);
    event_(1, 0, 0, '1);
    event_(0, 0, 10'b00_0000_0010, '1);
    // refund with nothing inserted
    event_(0, 1, 0, '1);
    // random events
    for (int i = 0; i < 2000; i++)
      event_(($urandom() % 2) == 0, ($urandom() % 8) == 0,
             ($urandom() % 3) == 0 ? 10'(1 << ($urandom() % 10)) : 10'b0, 10'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
