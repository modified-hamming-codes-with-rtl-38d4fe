// mhc_ref_pkg: reference model for the testbenches of the SEC-DED-DAEC-TAED code.
//
// It holds the two check matrices row by row, as bit strings (row r, column 1
// leftmost), and computes code words and syndromes from the rows. The design
// holds the same matrices column by column; the testbenches compare the two,
// plus the worked example of the published encoder and decoder simulations.
// Check columns of the TAED part are found here by looking for unit-weight
// columns, not taken from the design.
package mhc_ref_pkg;

  // TAED Hamming matrix, 5 rows x 21 columns.
  localparam logic [1:21] TROW [1:5] = '{
    21'b000000000001111111111,
    21'b000001111110000001111,
    21'b001110001110001110001,
    21'b010010010010010010010,
    21'b101011010101010100101
  };

  // DAEC matrix, 6 rows x 22 columns.
  localparam logic [1:22] DROW [1:6] = '{
    22'b1100110001110100100000,
    22'b0001010011011001010000,
    22'b1010100111100011001000,
    22'b1001001110010110000100,
    22'b0110101100001101000010,
    22'b0111011000101010000001
  };

  // Worked example of the published simulations.
  localparam logic [1:16] EX_DATA = 16'b1011101110111011;
  localparam logic [1:28] EX_CODE = 28'b1110011110111101110110010100;

  function automatic int col_weight(input int unsigned c);
    int w = 0;
    for (int r = 1; r <= 5; r++) w += int'(TROW[r][c]);
    return w;
  endfunction

  // Column of the TAED part holding data bit j (the j-th non-unit column).
  function automatic int unsigned data_col(input int unsigned j);
    int unsigned n = 0;
    for (int unsigned c = 1; c <= 21; c++)
      if (col_weight(c) != 1) begin
        n++;
        if (n == j) return c;
      end
    return 0;
  endfunction

  // Unit column of row r.
  function automatic int unsigned check_col(input int unsigned r);
    for (int unsigned c = 1; c <= 21; c++)
      if (col_weight(c) == 1 && TROW[r][c]) return c;
    return 0;
  endfunction

  function automatic logic [1:22] taed_encode(input logic [1:16] d);
    logic [1:21] c = '0;
    for (int unsigned j = 1; j <= 16; j++) c[data_col(j)] = d[j];
    for (int unsigned r = 1; r <= 5; r++) c[check_col(r)] = ^(TROW[r] & c);
    return {c, ^c};
  endfunction

  function automatic logic [1:6] daec_check(input logic [1:16] d);
    logic [1:6] k;
    for (int r = 1; r <= 6; r++) k[r] = ^(DROW[r][1:16] & d);
    return k;
  endfunction

  function automatic logic [1:28] encode(input logic [1:16] d);
    return {taed_encode(d), daec_check(d)};
  endfunction

  function automatic logic [1:16] data_of(input logic [1:28] w);
    logic [1:16] d;
    for (int unsigned j = 1; j <= 16; j++) d[j] = w[data_col(j)];
    return d;
  endfunction

  function automatic logic [1:5] taed_syn(input logic [1:22] w);
    logic [1:5] s;
    for (int r = 1; r <= 5; r++) s[r] = ^(TROW[r] & w[1:21]);
    return s;
  endfunction

  function automatic logic [1:6] daec_syn(input logic [1:22] w);
    logic [1:6] s;
    for (int r = 1; r <= 6; r++) s[r] = ^(DROW[r] & w);
    return s;
  endfunction

  // DAEC column i, read from the rows.
  function automatic logic [1:6] daec_col(input int unsigned i);
    logic [1:6] c;
    for (int r = 1; r <= 6; r++) c[r] = DROW[r][i];
    return c;
  endfunction

  function automatic logic [1:16] rand16();
    return 16'($urandom);
  endfunction

endpackage
