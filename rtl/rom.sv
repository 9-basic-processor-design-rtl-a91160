// rom: read-only memory built the way a mask ROM is drawn: a decoder turns the
// address into one active word line, and each data bit line is the OR of the
// word lines that have a connection ("dot") on that bit. Combinational read.
//
// CONTENTS holds the 2^AW words, word k at bits [k*DW +: DW]; bit b of word k
// set means word line k is connected to data line b. The default contents are
// the 8-entry, 4-bit example ROM of the lecture (rows 0..7 = 1001, 0100, 0010,
// 1001, 0010, 0001, 1000, 0000), whose address 3 reads 1001.
module rom #(
  parameter int unsigned            AW       = 3,
  parameter int unsigned            DW       = 4,
  parameter logic [(2**AW)*DW-1:0]  CONTENTS = 32'h0_8_1_2_9_2_4_9
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);
  logic [(2**AW)-1:0] word_line;

  decoder #(.N(AW)) u_dec (.in_val(addr), .out_val(word_line));

  // Wired-OR of every word line that has a dot on data line b.
  always_comb begin
    data = '0;
    for (int unsigned k = 0; k < 2**AW; k++)
      for (int unsigned b = 0; b < DW; b++)
        if (CONTENTS[k*DW + b]) data[b] = data[b] | word_line[k];
  end
endmodule
