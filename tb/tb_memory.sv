// tb_memory: checks the 65,536 x 32 memory: writes (en 1, rw 0) at the clock
// edge, combinational reads (en 1, rw 1), dataout 0 while en is 0, and no write
// when en is 0, at random addresses including the first and the last word.
module tb_memory;
  int checks = 0, failures = 0;
  logic        clk = 0, en, rw;
  logic [15:0] addr;
  logic [31:0] din, dout;
  logic [31:0] model [logic [15:0]];

  memory dut (.clk(clk), .addr(addr), .datain(din), .en(en), .rw(rw), .dataout(dout));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic [15:0] a, input logic [31:0] v, input logic enable);
    addr = a; din = v; en = enable; rw = 1'b0;
    @(posedge clk); #1;
    if (enable) model[a] = v;
  endtask

  task automatic read_check(input logic [15:0] a);
    addr = a; en = 1'b1; rw = 1'b1;
    #1;
    checks++;
    if (dout !== model[a]) begin
      failures++;
      $display("FAIL read %h = %h expected %h", a, dout, model[a]);
    end
  endtask

  initial begin
    logic [15:0] addrs [64];
    en = 0; rw = 1; addr = 0; din = 0;
    for (int i = 0; i < 64; i++) addrs[i] = 16'($urandom());
    addrs[0] = 16'h0000; addrs[1] = 16'hffff;
    foreach (addrs[i]) write(addrs[i], $urandom(), 1'b1);
    foreach (addrs[i]) read_check(addrs[i]);
    // en low: no write, output 0
    write(addrs[5], ~model[addrs[5]], 1'b0);
    read_check(addrs[5]);
    addr = addrs[5]; en = 1'b0; rw = 1'b1; #1;
    checks++;
    if (dout !== '0) begin failures++; $display("FAIL dataout with en=0: %h", dout); end
    // overwrite
    write(addrs[1], 32'hdead_beef, 1'b1);
    read_check(addrs[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
