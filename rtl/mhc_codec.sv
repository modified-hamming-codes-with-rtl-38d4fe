// mhc_codec: SEC-DED-DAEC-TAED error correction for a 16-bit memory word.
//
// Write side: wr_data is encoded into the 28-bit word wr_code that the memory
// stores. Read side: the 28-bit word read back, rd_code, is decoded into
// rd_data with rd_status telling what was found: single errors and double
// adjacent errors anywhere in the 28 bits are corrected; double errors and
// triple adjacent errors are detected and raise resend. rd_diag carries the
// syndromes and the verdicts of the two partial codes for debug.
// The memory array is outside this block: the design protects whatever stores
// the word, and adds no storage of its own.
//
// Interface: wr_data[1:16] -> wr_code[1:28]; rd_code[1:28] -> rd_data[1:16],
// rd_status, rd_diag. Both paths are combinational and independent, so they can
// be placed in front of and behind a memory of any timing.
module mhc_codec
  import mhc_pkg::*;
(
  input  data_t   wr_data,
  output code_t   wr_code,
  input  code_t   rd_code,
  output data_t   rd_data,
  output status_t rd_status,
  output diag_t   rd_diag
);

  mhc_encoder u_enc (
    .data      (wr_data),
    .code      (wr_code),
    .taed_code (),
    .daec_code ()
  );

  mhc_decoder u_dec (
    .code   (rd_code),
    .data   (rd_data),
    .status (rd_status),
    .diag   (rd_diag)
  );

endmodule
