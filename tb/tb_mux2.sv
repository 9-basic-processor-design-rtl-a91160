// tb_mux2: checks the 2-to-1 multiplexer at width 32 with random inputs:
// select 0 must give IN1 and select 1 must give IN2.
module tb_mux2;
  int checks = 0, failures = 0;
  logic [31:0] in1, in2, out;
  logic        sel;

  mux2 #(.W(32)) dut (.in1(in1), .in2(in2), .sel(sel), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      in1 = $urandom(); in2 = $urandom(); sel = 1'($urandom());
      if (in1 == in2) in2 = ~in1;
      #1;
      checks++;
      if (out !== (sel ? in2 : in1)) begin
        failures++;
        $display("FAIL sel=%0b in1=%h in2=%h out=%h", sel, in1, in2, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
