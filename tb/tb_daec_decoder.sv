// tb_daec_decoder: for random data words, injects no error, every single
// error (22), every double adjacent error (21) and every other double error
// into the 22-bit DAEC word. Singles and adjacent doubles must be corrected
// with the right flag; other doubles must be flagged as errors that are not
// single errors. Error and the syndrome are checked against the reference.
module tb_daec_decoder;
  import mhc_ref_pkg::*;

  logic [1:22] code;
  logic [1:16] data;
  logic [1:6]  syndrome;
  logic        error, single_err, double_adj, ue;
  int checks = 0, failures = 0;
  int n_ue = 0;

  daec_decoder dut (
    .code(code), .data(data), .syndrome(syndrome), .error(error),
    .single_err(single_err), .double_adj(double_adj), .ue(ue)
  );

  // exp_kind: 0 none, 1 single, 2 adjacent double, 3 other double
  task automatic apply(input logic [1:16] d, input logic [1:22] e, input int exp_kind);
    logic [1:22] w;
    logic        ok;
    w = {d, daec_check(d)} ^ e;
    code = w;
    #1;
    checks++;
    ok = (syndrome === daec_syn(w)) && (error === (exp_kind != 0));
    case (exp_kind)
      0: ok &= (data === d) && !single_err && !double_adj && !ue;
      1: ok &= (data === d) && single_err && !double_adj && !ue;
      2: ok &= (data === d) && !single_err && double_adj && !ue;
      default: ok &= !single_err;
    endcase
    if (exp_kind == 3 && ue) n_ue++;
    if (!ok) begin
      failures++;
      $display("FAIL d=%b e=%b kind=%0d: data=%b s=%b err=%b se=%b da=%b ue=%b",
               d, e, exp_kind, data, syndrome, error, single_err, double_adj, ue);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Published example: data 1011101110111011, word 1011101110111011 010100.
    apply(16'b1011101110111011, 22'b0100000000000000000000, 1);
    checks++;
    if (syndrome !== 6'b100011) begin
      failures++;
      $display("FAIL example syndrome %b", syndrome);
    end
    apply(16'b1011101110111011, 22'b0110000000000000000000, 2);
    checks++;
    if (syndrome !== 6'b101000) begin
      failures++;
      $display("FAIL example syndrome %b", syndrome);
    end
    repeat (20) begin
      logic [1:16] d;
      d = rand16();
      apply(d, '0, 0);
      for (int i = 0; i < 22; i++) apply(d, 22'(1) << i, 1);
      for (int i = 0; i < 21; i++) apply(d, 22'(3) << i, 2);
      for (int i = 0; i < 22; i++)
        for (int j = i + 2; j < 22; j++) apply(d, (22'(1) << i) | (22'(1) << j), 3);
    end
    checks++;
    if (n_ue == 0) begin
      failures++;
      $display("FAIL: ue never raised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
