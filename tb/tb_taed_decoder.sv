// tb_taed_decoder: for random data words, injects no error, every single
// error (22), every double error (231) and every triple adjacent error into
// the 22-bit TAED word, and checks data and flags: singles are corrected,
// doubles give double_err, triple adjacent errors give triple_adj. The triple
// <c20, c21, P> is the one pattern this code alone reads as a single error; it
// is checked to be reported as such (the 28-bit decoder catches it). The
// syndrome and parity outputs are checked against the reference.
module tb_taed_decoder;
  import mhc_ref_pkg::*;

  logic [1:22] code;
  logic [1:16] data;
  logic [1:5]  syndrome;
  logic        parity_err, single_err, double_err, triple_adj;
  int checks = 0, failures = 0;

  taed_decoder dut (
    .code(code), .data(data), .syndrome(syndrome), .parity_err(parity_err),
    .single_err(single_err), .double_err(double_err), .triple_adj(triple_adj)
  );

  // exp_kind: 0 none, 1 single, 2 double, 3 triple adjacent,
  // 4 the triple <c20, c21, P>, read as a single error by this code alone
  task automatic apply(input logic [1:16] d, input logic [1:22] e, input int exp_kind);
    logic [1:22] w;
    w = taed_encode(d) ^ e;
    code = w;
    #1;
    checks++;
    if (syndrome !== taed_syn(w) || parity_err !== ^w
        || single_err !== (exp_kind == 1 || exp_kind == 4) || double_err !== (exp_kind == 2)
        || triple_adj !== (exp_kind == 3)
        || (exp_kind <= 1 && data !== d)) begin
      failures++;
      $display("FAIL d=%b e=%b kind=%0d: data=%b s=%b se=%b de=%b ta=%b",
               d, e, exp_kind, data, syndrome, single_err, double_err, triple_adj);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20) begin
      logic [1:16] d;
      d = rand16();
      apply(d, '0, 0);
      for (int i = 0; i < 22; i++) apply(d, 22'(1) << i, 1);
      for (int i = 0; i < 22; i++)
        for (int j = i + 1; j < 22; j++) apply(d, (22'(1) << i) | (22'(1) << j), 2);
      // triple adjacent errors starting at c1 .. c19 (bit 22-k is column k)
      for (int k = 1; k <= 19; k++) apply(d, 22'(7) << (22 - k - 2), 3);
      apply(d, 22'(7), 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
