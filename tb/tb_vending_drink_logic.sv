// tb_vending_drink_logic: checks the selector/pressure gating with random
// input patterns: drink_select is 1 exactly when some selected slot has a
// bottle, and each latch opens only for its selector while drink_release is 1.
module tb_vending_drink_logic;
  int checks = 0, failures = 0;
  logic [9:0] sel, pres, latch;
  logic       rel, dsel;

  vending_drink_logic dut (.selector(sel), .pressure(pres), .drink_release(rel),
                           .drink_select(dsel), .drink_latch(latch));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_sel;
    for (int i = 0; i < 400; i++) begin
      sel = (i % 2 == 0) ? 10'(1 << ($urandom() % 10)) : 10'($urandom());
      pres = 10'($urandom()); rel = 1'($urandom());
      #1;
      exp_sel = 1'b0;
      for (int k = 0; k < 10; k++) if (sel[k] && pres[k]) exp_sel = 1'b1;
      checks += 2;
      if (dsel !== exp_sel) begin failures++; $display("FAIL select sel=%b pres=%b -> %b", sel, pres, dsel); end
      if (latch !== (rel ? sel : 10'b0)) begin failures++; $display("FAIL latch sel=%b rel=%b -> %b", sel, rel, latch); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
