// tb_lc2kx_control: checks every row of the control ROM against the control
// word expected for each opcode. The ADD row must be 1 1 1 1 0 0 with R/W read,
// which is the row drawn for "add 1 2 3" in the lecture.
module tb_lc2kx_control;
  import lc2kx_pkg::*;
  int checks = 0, failures = 0;
  opcode_t op;
  ctrl_t   c;

  lc2kx_control dut (.opcode(op), .ctrl(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected word: {dest, wdata, rf_en, alub, alu_fn, mem_en, mem_rw, branch}
  function automatic logic [7:0] expected(opcode_t o);
    case (o)
      OP_ADD:  return 8'b1111_0010;
      OP_NAND: return 8'b1111_1010;
      OP_LW:   return 8'b0010_0110;
      OP_SW:   return 8'b0000_0100;
      OP_BEQ:  return 8'b0001_0011;
      default: return 8'b0000_0010;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 8; i++) begin
      op = opcode_t'(i);
      #1;
      checks++;
      if (8'(c) !== expected(op)) begin
        failures++;
        $display("FAIL opcode %03b ctrl=%b expected=%b", i, 8'(c), expected(op));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
