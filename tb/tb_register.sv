// tb_register: checks the clocked register: reset value, load when en is 1,
// hold when en is 0, compared with a reference value kept by the testbench.
module tb_register;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, en;
  logic [31:0] d, q, model;

  register #(.W(32), .RESET_VAL(32'h0000_0040)) dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; d = '0;
    @(posedge clk); #1;
    rst = 0;
    model = 32'h40;
    checks++;
    if (q !== model) begin failures++; $display("FAIL reset q=%h", q); end
    for (int i = 0; i < 200; i++) begin
      en = 1'($urandom()); d = $urandom();
      @(posedge clk); #1;
      if (en) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d en=%b q=%h expected=%h", i, en, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
