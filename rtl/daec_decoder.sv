// daec_decoder: decoder of the (22,16) SEC-DED-DAEC code.
//
// The 6-bit syndrome p2 is the XOR of the matrix columns of all set bits of
// the received word. An OR of the syndrome bits flags "error detected". The
// syndrome decoder marks the bit, or the two adjacent bits, whose syndrome
// matches; n 2-input XOR gates flip them. If the syndrome is non-zero and the
// decoder marks nothing (a NOR over its outputs, ANDed with "error detected")
// the error is uncorrectable (ue): any double error that is not adjacent, and
// other multiple errors. This is the published block diagram, built as drawn.
//
// Interface: code[1:22] in (data 1..16, check k1..k6); corrected data, p2,
// error, single_err, double_adj and ue out. Combinational.
module daec_decoder
  import mhc_pkg::*;
(
  input  daec_code_t code,
  output data_t      data,
  output daec_syn_t  syndrome,
  output logic       error,
  output logic       single_err,
  output logic       double_adj,
  output logic       ue
);

  logic [1:DAEC_N] loc;

  always_comb begin
    syndrome = '0;
    for (int unsigned i = 1; i <= DAEC_N; i++)
      if (code[i]) syndrome ^= DAEC_COL[i];
  end

  syndrome_decoder #(
    .NB       (DAEC_N),
    .RB       (DAEC_R),
    .H_COLS   (DAEC_COL),
    .ADJACENT (1'b1)
  ) u_locate (
    .syndrome       (syndrome),
    .locator        (loc),
    .single_match   (single_err),
    .adjacent_match (double_adj)
  );

  assign error     = |syndrome;
  assign data      = code[1:K] ^ loc[1:K];
  assign ue        = error & ~(|loc);

endmodule
