// tb_rom: checks the ROM with its default contents, the 8-entry 4-bit example
// (address 3 must read 1001), against a table of the expected rows written out
// by hand, and a 16-word 8-bit ROM with random contents against its parameter.
module tb_rom;
  int checks = 0, failures = 0;
  logic [2:0] a8;
  logic [3:0] d8;
  logic [3:0] a16;
  logic [7:0] d16;

  localparam logic [3:0] ROWS [8] = '{4'b1001, 4'b0100, 4'b0010, 4'b1001,
                                      4'b0010, 4'b0001, 4'b1000, 4'b0000};
  localparam logic [127:0] RAND = 128'h0123_4567_89ab_cdef_f00d_cafe_5a5a_1e1e;

  rom dut (.addr(a8), .data(d8));
  rom #(.AW(4), .DW(8), .CONTENTS(RAND)) dut16 (.addr(a16), .data(d16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      a8 = 3'(i);
      #1;
      checks++;
      if (d8 !== ROWS[i]) begin
        failures++;
        $display("FAIL addr=%0d data=%b expected=%b", i, d8, ROWS[i]);
      end
    end
    for (int i = 0; i < 16; i++) begin
      a16 = 4'(i);
      #1;
      checks++;
      if (d16 !== RAND[i*8 +: 8]) begin
        failures++;
        $display("FAIL addr=%0d data=%h", i, d16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
