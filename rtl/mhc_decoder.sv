// mhc_decoder: decoder of the 28-bit SEC-DED-DAEC-TAED code word.
//
// The TAED decoder works on bits 1..22 and yields the Hamming syndrome p1 and
// the parity check pe; the DAEC decoder works on the 16 data bits (taken from
// their TAED columns) and the check bits 23..28 and yields p2. Together
// {p1, pe, p2} is the syndrome of the whole word under one 12x28 check matrix
// (mhc_pkg::MHC_COL). That syndrome is decoded with the same structure as the
// DAEC part, at n = 28:
//   1. zero syndrome: no error;
//   2. equal to a column: single error, that bit is flipped;
//   3. equal to one of the 27 adjacent-pair syndromes: double adjacent error,
//      both bits are flipped;
//   4. anything else: uncorrectable (ue), and a request to resend the word.
// For the combined matrix all 28 single syndromes and 27 adjacent-pair
// syndromes are distinct and non-zero, no double error (adjacent or not) gives
// a single-error syndrome, no non-adjacent double error gives an adjacent-pair
// syndrome and no triple adjacent error gives a correctable one, so every
// single and double adjacent error is corrected and every double and triple
// adjacent error is detected, across the whole 28-bit word.
// An uncorrectable syndrome that equals one of the 26 triple-adjacent
// syndromes is reported as triple_adj, any other as double_err. The results of
// the two sub-decoders alone (out1, out2, s1, de, ta, s2, da) are brought out
// on diag for debug. That the two partial syndromes are decoded as one, and the
// flag encoding, are this design's reading of the published algorithm.
// On an uncorrectable error the received data bits are passed through.
//
// Interface: code[1:28] in; data[1:16], status, diag out. Combinational.
module mhc_decoder
  import mhc_pkg::*;
(
  input  code_t   code,
  output data_t   data,
  output status_t status,
  output diag_t   diag
);

  taed_syn_t  p1;
  logic       pe;
  daec_syn_t  p2;
  daec_code_t daec_word;
  data_t      raw_data;
  syn_t       syndrome;
  code_t      loc;
  code_t      corrected;
  logic       single_match;
  logic       adjacent_match;
  logic       triple_match;

  always_comb begin
    for (int unsigned j = 1; j <= K; j++) raw_data[j] = code[TAED_DATA_POS[j]];
  end
  assign daec_word = {raw_data, code[TAED_N+1:N]};

  taed_decoder u_taed (
    .code       (code[1:TAED_N]),
    .data       (diag.out1),
    .syndrome   (p1),
    .parity_err (pe),
    .single_err (diag.s1),
    .double_err (diag.de),
    .triple_adj (diag.ta)
  );

  daec_decoder u_daec (
    .code       (daec_word),
    .data       (diag.out2),
    .syndrome   (p2),
    .error      (),
    .single_err (diag.s2),
    .double_adj (diag.da),
    .ue         (diag.daec_ue)
  );

  assign syndrome = {p1, pe, p2};

  syndrome_decoder #(
    .NB       (N),
    .RB       (R),
    .H_COLS   (MHC_COL),
    .ADJACENT (1'b1)
  ) u_locate (
    .syndrome       (syndrome),
    .locator        (loc),
    .single_match   (single_match),
    .adjacent_match (adjacent_match)
  );

  always_comb begin
    triple_match = 1'b0;
    for (int unsigned i = 1; i + 2 <= N; i++)
      if (syndrome == (MHC_COL[i] ^ MHC_COL[i+1] ^ MHC_COL[i+2])) triple_match = 1'b1;
  end

  assign corrected = code ^ loc;

  always_comb begin
    for (int unsigned j = 1; j <= K; j++) data[j] = corrected[TAED_DATA_POS[j]];
  end

  assign diag.p1 = p1;
  assign diag.pe = pe;
  assign diag.p2 = p2;

  always_comb begin
    status            = '0;
    status.error      = |syndrome;
    status.single_err = single_match;
    status.double_adj = adjacent_match;
    status.ue         = status.error & ~(|loc);
    status.triple_adj = status.ue & triple_match;
    status.double_err = status.ue & ~triple_match;
    status.resend     = status.ue;
  end

endmodule
