// tb_alu: checks the ALU's two functions (fn 0 add, fn 1 nand) and the EQ
// output on random and equal operand pairs.
module tb_alu;
  import lc2kx_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, y;
  alu_fn_t     fn;
  logic        eq;

  alu dut (.in1(a), .in2(b), .fn(fn), .out(y), .eq(eq));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] z, input alu_fn_t f);
    logic [31:0] expected;
    a = x; b = z; fn = f;
    #1;
    expected = (f == ALU_ADD) ? x + z : ~(x & z);
    checks += 2;
    if (y !== expected) begin
      failures++;
      $display("FAIL fn=%0d %h %h -> %h expected %h", f, x, z, y, expected);
    end
    if (eq !== (x == z)) begin
      failures++;
      $display("FAIL eq %h %h -> %b", x, z, eq);
    end
  endtask

  initial begin
    logic [31:0] r;
    check(32'd3, 32'd4, ALU_ADD);
    check(32'hffff_ffff, 32'h0000_ffff, ALU_NAND);
    for (int i = 0; i < 100; i++) begin
      r = $urandom();
      check(r, r, ALU_ADD);
      check($urandom(), $urandom(), ALU_ADD);
      check($urandom(), $urandom(), ALU_NAND);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
