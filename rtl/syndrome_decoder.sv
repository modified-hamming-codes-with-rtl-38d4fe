// syndrome_decoder: error locator for single and double adjacent errors.
//
// For every bit position i an RB-input AND compares the syndrome with column i
// of the check matrix (a single error at i). For every pair <i,i+1> another
// AND compares it with the XOR of columns i and i+1 (a double adjacent error).
// Output i is the OR of the three terms that involve bit i: the single term,
// the pair <i-1,i> and the pair <i,i+1>. Flipping the bits marked in locator
// corrects the word. A syndrome that matches nothing gives an all-zero locator.
// This is the decoder structure of the published design; single_match and
// adjacent_match (ORs of the single and of the pair terms) are added for status.
// With ADJACENT = 0 the pair terms are left out and the block is a plain
// single-error locator.
//
// Parameters: NB bit positions, RB syndrome bits, H_COLS[i] the column of bit i
// (row 1 leftmost). Defaults: the (22,16) DAEC matrix.
// Interface: syndrome[1:RB] in; locator[1:NB], single_match, adjacent_match out.
// Combinational.
module syndrome_decoder #(
  parameter int unsigned          NB       = mhc_pkg::DAEC_N,
  parameter int unsigned          RB       = mhc_pkg::DAEC_R,
  parameter logic [1:NB][1:RB]    H_COLS   = mhc_pkg::DAEC_COL,
  parameter bit                   ADJACENT = 1'b1
) (
  input  logic [1:RB] syndrome,
  output logic [1:NB] locator,
  output logic       single_match,
  output logic       adjacent_match
);

  logic [1:NB]   sgl;
  logic [1:NB-1] adj;

  always_comb begin
    for (int unsigned i = 1; i <= NB; i++) sgl[i] = (syndrome == H_COLS[i]);
    for (int unsigned i = 1; i < NB; i++)
      adj[i] = ADJACENT && (syndrome == (H_COLS[i] ^ H_COLS[i+1]));
    for (int unsigned i = 1; i <= NB; i++) begin
      locator[i] = sgl[i];
      if (i > 1) locator[i] = locator[i] | adj[i-1];
      if (i < NB) locator[i] = locator[i] | adj[i];
    end
    single_match   = |sgl;
    adjacent_match = |adj;
  end

endmodule
