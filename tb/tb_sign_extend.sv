// tb_sign_extend: checks that OUT(31:16) copies IN(15) and OUT(15:0) = IN for
// positive, negative, boundary and random 16-bit inputs.
module tb_sign_extend;
  int checks = 0, failures = 0;
  logic [15:0] x;
  logic [31:0] y;

  sign_extend dut (.in_val(x), .out_val(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] v);
    int signed expected;
    x = v;
    #1;
    expected = int'(signed'(v));
    checks++;
    if (y !== 32'(expected)) begin
      failures++;
      $display("FAIL in=%h out=%h expected=%h", v, y, expected);
    end
  endtask

  initial begin
    check(16'h0000); check(16'h7fff); check(16'h8000); check(16'hffff); check(16'h0005);
    for (int i = 0; i < 200; i++) check(16'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
