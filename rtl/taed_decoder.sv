// taed_decoder: decoder of the (22,16) extended Hamming code with triple
// adjacent error detection.
//
// The 5-bit syndrome p1 is the XOR of the matrix columns of all set bits among
// c1..c21; pe is the parity of all 22 bits. The decision follows the extended
// Hamming rules:
//   pe = 0, p1 = 0          no error
//   pe = 1, p1 = column i   single error at c_i, corrected
//   pe = 1, p1 = 0          single error in the parity bit (data unaffected)
//   pe = 0, p1 != 0         double error, detected (de)
//   pe = 1, p1 no column    triple adjacent error, detected (ta)
// The column order makes the XOR of any three consecutive columns c_i..c_i+2
// a value that is no column, so a triple adjacent error inside c1..c21 is never
// miscorrected. With the parity bit stored after c21, the triple <c20,c21,P>
// looks like a single error at c5 here; the 28-bit decoder resolves it through
// the DAEC syndrome.
// On a detected uncorrectable error the received data bits are passed through.
//
// Interface: code[1:22] in; corrected data, p1, pe and the flags out.
// Combinational.
module taed_decoder
  import mhc_pkg::*;
(
  input  taed_code_t code,
  output data_t      data,
  output taed_syn_t  syndrome,
  output logic       parity_err,
  output logic       single_err,
  output logic       double_err,
  output logic       triple_adj
);

  logic [1:TAED_H] loc;
  logic            col_match;
  logic            unused_adj;
  logic            syn_nz;

  always_comb begin
    syndrome = '0;
    for (int unsigned i = 1; i <= TAED_H; i++)
      if (code[i]) syndrome ^= TAED_COL[i];
  end

  assign parity_err = ^code;
  assign syn_nz     = |syndrome;

  syndrome_decoder #(
    .NB       (TAED_H),
    .RB       (TAED_R),
    .H_COLS   (TAED_COL),
    .ADJACENT (1'b0)
  ) u_locate (
    .syndrome       (syndrome),
    .locator        (loc),
    .single_match   (col_match),
    .adjacent_match (unused_adj)
  );

  assign single_err = parity_err & (col_match | ~syn_nz);
  assign double_err = ~parity_err & syn_nz;
  assign triple_adj = parity_err & syn_nz & ~col_match;

  always_comb begin
    for (int unsigned j = 1; j <= K; j++)
      data[j] = code[TAED_DATA_POS[j]] ^ (parity_err & loc[TAED_DATA_POS[j]]);
  end

endmodule
