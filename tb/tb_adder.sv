// tb_adder: checks the 32-bit adder with random operands, carries out of the
// top bit and the PC + 1 case.
module tb_adder;
  int checks = 0, failures = 0;
  logic [31:0] a, b, s;
  logic [32:0] wide;

  adder #(.W(32)) dut (.in1(a), .in2(b), .out(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    a = x; b = y;
    #1;
    wide = {1'b0, x} + {1'b0, y};
    checks++;
    if (s !== wide[31:0]) begin
      failures++;
      $display("FAIL %h + %h = %h", x, y, s);
    end
  endtask

  initial begin
    check(32'hffff_ffff, 32'd1);
    check(32'd41, 32'd1);
    check(32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 200; i++) check($urandom(), $urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
