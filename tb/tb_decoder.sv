// tb_decoder: checks the 3x8 decoder against the truth table (000 -> 00000001,
// 001 -> 00000010, ...) and a 5x32 decoder for every input: the output must be
// the single line numbered by the input.
module tb_decoder;
  int checks = 0, failures = 0;
  logic [2:0]  in3;
  logic [7:0]  out8;
  logic [4:0]  in5;
  logic [31:0] out32;

  decoder #(.N(3)) dut  (.in_val(in3), .out_val(out8));
  decoder #(.N(5)) dut5 (.in_val(in5), .out_val(out32));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] expect8;
    for (int i = 0; i < 8; i++) begin
      in3 = 3'(i);
      expect8 = 8'b0000_0001 << i;
      #1;
      checks++;
      if (out8 !== expect8) begin
        failures++;
        $display("FAIL in=%b out=%b expected=%b", in3, out8, expect8);
      end
    end
    for (int i = 0; i < 32; i++) begin
      in5 = 5'(i);
      #1;
      checks++;
      if (out32 !== (32'd1 << i)) begin
        failures++;
        $display("FAIL in=%0d out=%b", in5, out32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
