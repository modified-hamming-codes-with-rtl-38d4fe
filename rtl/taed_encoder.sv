// taed_encoder: encoder of the (22,16) extended Hamming code with triple
// adjacent error detection (the TAED part of the 28-bit code word).
//
// The 16 data bits are copied into the data columns of the 5x21 check matrix
// (c3, c5, c6, c8..c12, c14..c21, in order). The Hamming check bits sit in the
// unit-weight columns: the check bit of row r is the XOR of the data bits whose
// column has a 1 in row r, so that the 5-bit syndrome of the word is zero. Bit 22
// is the overall parity bit, the XOR of c1..c21.
//
// The matrix and the bit placement are those of the published code (see
// mhc_pkg); keeping the parity bit after c21 follows the published word layout.
//
// Interface: data[1:16] in, code[1:22] out (c1..c21, P). Purely combinational,
// a single XOR tree per output bit, no clock.
module taed_encoder
  import mhc_pkg::*;
(
  input  data_t      data,
  output taed_code_t code
);

  always_comb begin
    taed_syn_t s;
    logic [1:TAED_H] c;
    s = '0;
    c = '0;
    for (int unsigned j = 1; j <= K; j++) begin
      c[TAED_DATA_POS[j]] = data[j];
      if (data[j]) s ^= TAED_COL[TAED_DATA_POS[j]];
    end
    for (int unsigned r = 1; r <= TAED_R; r++) c[TAED_CHECK_POS[r]] = s[r];
    code = {c, ^c};
  end

endmodule
