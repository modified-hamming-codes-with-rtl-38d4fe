// mhc_pkg: constants and types of the modified Hamming code (SEC-DED-DAEC-TAED)
// for 16-bit memory words.
//
// The 28-bit code word is the concatenation of two codes over the same 16 data bits:
//   bits  1..22  an extended Hamming (22,16) code whose 5x21 check matrix is
//                shortened and reordered so that every triple adjacent error gives
//                a syndrome that matches no column (TAED part), followed by its
//                overall parity bit P in bit 22;
//   bits 23..28  the 6 check bits of a (22,16) code whose 6x22 check matrix has
//                weight-3 data columns and distinct adjacent-pair syndromes
//                (DAEC part).
// Inside the TAED part the check bits sit in the unit-weight columns c1, c2, c4,
// c7 and c13, and data bits 1..16 fill the remaining columns in order.
//
// Numbering: every vector in this design is declared [1:N], so index 1 is the
// leftmost bit of a literal and matches the column numbering of the check
// matrices (column 1 first). Column constants are written row 1 first. Verilator
// reports these ascending ranges (ASCRANGE); they are deliberate.
//
// The TAED columns follow the construction rule of the code (weights odd, odd,
// even, repeating; smallest free value; even columns avoid every sum of three
// consecutive earlier columns). The DAEC columns are those of the published
// (22,16) SEC-DED-DAEC matrix. Which bit sits where in the 28-bit word, and the
// worked example (data 1011101110111011 -> 1110011110111101110110 010100), follow
// the published simulation of the encoder.
package mhc_pkg;

  localparam int unsigned K        = 16;  // data bits
  localparam int unsigned TAED_R   = 5;   // Hamming rows of the TAED part
  localparam int unsigned TAED_H   = 21;  // Hamming columns (16 data + 5 check)
  localparam int unsigned TAED_N   = 22;  // TAED code word incl. overall parity
  localparam int unsigned DAEC_R   = 6;   // rows of the DAEC matrix
  localparam int unsigned DAEC_N   = 22;  // DAEC code word: 16 data + 6 check
  localparam int unsigned N        = 28;  // full code word
  localparam int unsigned R        = 12;  // full syndrome: 5 + 1 + 6

  typedef logic [1:K]      data_t;
  typedef logic [1:N]      code_t;
  typedef logic [1:TAED_N] taed_code_t;
  typedef logic [1:DAEC_N] daec_code_t;
  typedef logic [1:TAED_R] taed_syn_t;
  typedef logic [1:DAEC_R] daec_syn_t;
  typedef logic [1:R]      syn_t;

  // TAED Hamming matrix, one entry per column c1..c21, row 1 leftmost.
  localparam logic [1:TAED_H][1:TAED_R] TAED_COL = {
    5'b00001, 5'b00010, 5'b00101, 5'b00100, 5'b00111, 5'b01001, 5'b01000,
    5'b01011, 5'b01100, 5'b01101, 5'b01110, 5'b10001, 5'b10000, 5'b10011,
    5'b10100, 5'b10101, 5'b10110, 5'b11000, 5'b11001, 5'b11010, 5'b11101
  };

  // Column of the TAED part that holds data bit j.
  localparam int unsigned TAED_DATA_POS [1:K] = '{
    3, 5, 6, 8, 9, 10, 11, 12, 14, 15, 16, 17, 18, 19, 20, 21
  };

  // Column holding the check bit of row r (its column is the unit vector of row r).
  localparam int unsigned TAED_CHECK_POS [1:TAED_R] = '{13, 7, 4, 2, 1};

  // DAEC matrix, columns 1..16 for the data bits and 17..22 for check bits k1..k6.
  localparam logic [1:DAEC_N][1:DAEC_R] DAEC_COL = {
    6'b101100, 6'b100011, 6'b001011, 6'b010101, 6'b101010, 6'b110001,
    6'b000111, 6'b001110, 6'b011100, 6'b111000, 6'b101001, 6'b110100,
    6'b010011, 6'b100110, 6'b001101, 6'b011010,
    6'b100000, 6'b010000, 6'b001000, 6'b000100, 6'b000010, 6'b000001
  };

  // Column i of the combined 12x28 check matrix: {TAED Hamming rows, overall
  // parity row, DAEC rows}. The parity row covers bits 1..22; a data bit carries
  // its DAEC column, a DAEC check bit its unit column.
  function automatic syn_t mhc_col(input int unsigned i);
    taed_syn_t t;
    logic      p;
    daec_syn_t d;
    t = '0;
    p = (i <= TAED_N);
    d = '0;
    if (i <= TAED_H) t = TAED_COL[i];
    for (int unsigned j = 1; j <= K; j++)
      if (TAED_DATA_POS[j] == i) d = DAEC_COL[j];
    if (i > TAED_N) d = DAEC_COL[K + i - TAED_N];
    return {t, p, d};
  endfunction

  function automatic logic [1:N][1:R] mhc_cols();
    logic [1:N][1:R] c;
    for (int unsigned i = 1; i <= N; i++) c[i] = mhc_col(i);
    return c;
  endfunction

  localparam logic [1:N][1:R] MHC_COL = mhc_cols();

  // Decoder status, as seen by the user of the memory.
  typedef struct packed {
    logic error;       // syndrome non-zero
    logic single_err;  // single error found and corrected
    logic double_adj;  // double adjacent error found and corrected
    logic double_err;  // uncorrectable, not a triple adjacent pattern
    logic triple_adj;  // uncorrectable, syndrome of a triple adjacent error
    logic ue;          // uncorrectable error: data not corrected
    logic resend;      // request to fetch or rewrite the word again
  } status_t;

  // Results of the two sub-decoders, for debug.
  typedef struct packed {
    taed_syn_t p1;         // TAED Hamming syndrome
    logic      pe;         // TAED overall parity check
    daec_syn_t p2;         // DAEC syndrome
    logic      s1;         // TAED: single error
    logic      de;         // TAED: double error
    logic      ta;         // TAED: triple adjacent error
    logic      s2;         // DAEC: single error
    logic      da;         // DAEC: double adjacent error
    logic      daec_ue;    // DAEC: uncorrectable
    data_t     out1;       // data corrected by the TAED part alone
    data_t     out2;       // data corrected by the DAEC part alone
  } diag_t;

endpackage
