// daec_encoder: check-bit generator of the (22,16) single error correcting,
// double error detecting, double adjacent error correcting code.
//
// The check matrix has the 16 data columns first and the identity in columns
// 17..22, so check bit k_r is the XOR of the data bits whose column has a 1 in
// row r (the XOR network of the generator matrix). Every data column has weight
// three, so each check bit is an XOR of 8 data bits.
//
// The matrix is the published one (see mhc_pkg).
//
// Interface: data[1:16] in, check[1:6] out (k1..k6). Combinational.
module daec_encoder
  import mhc_pkg::*;
(
  input  data_t     data,
  output daec_syn_t check
);

  always_comb begin
    check = '0;
    for (int unsigned j = 1; j <= K; j++)
      if (data[j]) check ^= DAEC_COL[j];
  end

endmodule
