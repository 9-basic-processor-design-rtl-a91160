// tb_register_file: checks the 8 x 32 register file with two read ports and
// one write port against a reference array: reset to zero, random writes with
// random write enable, both read ports read combinationally, and a read of the
// register being written returns the old value until the clock edge.
module tb_register_file;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, we;
  logic [2:0]  r1, r2, w;
  logic [31:0] d, out1, out2;
  logic [31:0] model [8];

  register_file dut (.clk(clk), .rst(rst), .r1(r1), .r2(r2), .w(w), .d(d), .we(we),
                     .out1(out1), .out2(out2));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; w = 0; d = 0; r1 = 0; r2 = 0;
    @(posedge clk); #1;
    rst = 0;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 300; i++) begin
      we = 1'($urandom()); w = 3'($urandom()); d = $urandom();
      r1 = 3'($urandom()); r2 = (i % 4 == 0) ? w : 3'($urandom());
      #1;
      checks += 2;
      if (out1 !== model[r1]) begin failures++; $display("FAIL out1 r%0d=%h exp %h", r1, out1, model[r1]); end
      if (out2 !== model[r2]) begin failures++; $display("FAIL out2 r%0d=%h exp %h", r2, out2, model[r2]); end
      @(posedge clk); #1;
      if (we) model[w] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
