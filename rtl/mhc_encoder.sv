// mhc_encoder: encoder of the 28-bit SEC-DED-DAEC-TAED code word.
//
// The data word goes through two encoders in parallel: the TAED encoder forms
// the 22-bit extended Hamming word (c1..c21 and the parity bit) and the DAEC
// encoder forms 6 further check bits. The 28-bit word is the TAED word followed
// by the DAEC check bits. The two partial words are also brought out: taed_code
// and daec_code (data followed by the DAEC check bits), the latter being the
// code word of the (22,16) DAEC code on its own.
// Example: data 1011101110111011 gives 1110011110111101110110 010100.
//
// Interface: data[1:16] in; code[1:28], taed_code[1:22], daec_code[1:22] out.
// Combinational; the depth is that of the deepest XOR tree (9 inputs).
module mhc_encoder
  import mhc_pkg::*;
(
  input  data_t      data,
  output code_t      code,
  output taed_code_t taed_code,
  output daec_code_t daec_code
);

  daec_syn_t check;

  taed_encoder u_taed (.data(data), .code(taed_code));
  daec_encoder u_daec (.data(data), .check(check));

  assign daec_code = {data, check};
  assign code      = {taed_code, check};

endmodule
