// tb_mhc_decoder: checks the 28-bit decoder.
// First the four words of the published decoder simulation (no error, a
// single error, a double adjacent error, a triple adjacent error on bits 1..3)
// with the printed data, syndromes p1 and p2 and flags. Then, for random data,
// every single error (28), every double adjacent error (27), every other
// double error (351) and every triple adjacent error (26) across the whole
// word: the first two must be corrected, the others detected with resend and
// the right flag.
module tb_mhc_decoder;
  import mhc_ref_pkg::*;
  import mhc_pkg::status_t;
  import mhc_pkg::diag_t;

  logic [1:28] code;
  logic [1:16] data;
  status_t     status;
  diag_t       diag;
  int checks = 0, failures = 0;

  mhc_decoder dut (.code(code), .data(data), .status(status), .diag(diag));

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s: code=%b data=%b status=%b", msg, code, data, status);
  endtask

  // kind: 0 none, 1 single, 2 adjacent double, 3 other double, 4 triple adjacent
  task automatic apply(input logic [1:16] d, input logic [1:28] e, input int kind);
    logic ok;
    code = encode(d) ^ e;
    #1;
    checks++;
    ok = (status.error == (kind != 0))
      && (status.single_err == (kind == 1))
      && (status.double_adj == (kind == 2))
      && (status.double_err == (kind == 3))
      && (status.triple_adj == (kind == 4))
      && (status.ue == (kind >= 3)) && (status.resend == (kind >= 3))
      && (kind >= 3 || data == d)
      && (diag.p1 == taed_syn(code[1:22])) && (diag.pe == ^code[1:22])
      && (diag.p2 == daec_syn({data_of(code), code[23:28]}));
    if (!ok) fail($sformatf("kind %0d e=%b", kind, e));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Published simulation, values as printed.
    code = 28'b1110011110111101110110010100;
    #1;
    checks++;
    if (data !== 16'b1011101110111011 || status.error || diag.p1 !== 5'b00000 || diag.p2 !== 6'b000000)
      fail("example t0");
    code = 28'b1110111110111101110110010100;
    #1;
    checks++;
    if (data !== 16'b1011101110111011 || !status.error || !status.single_err
        || diag.p1 !== 5'b00111 || diag.p2 !== 6'b100011
        || diag.out1 !== 16'b1011101110111011 || diag.out2 !== 16'b1011101110111011)
      fail("example t1");
    code = 28'b1110101110111101110110010100;
    #1;
    checks++;
    if (data !== 16'b1011101110111011 || !status.error || !status.double_adj
        || diag.p1 !== 5'b01110 || diag.p2 !== 6'b101000
        || diag.out2 !== 16'b1011101110111011)
      fail("example t2");
    code = 28'b0000011110111101110110010100;
    #1;
    checks++;
    if (!status.error || !status.triple_adj || !status.resend || status.double_err
        || diag.p1 !== 5'b00110 || diag.p2 !== 6'b101100
        || diag.s1 || !diag.s2 || !diag.ta || diag.de || diag.da || diag.daec_ue
        || diag.out2 !== 16'b1011101110111011)
      fail("example t3");

    repeat (12) begin
      logic [1:16] d;
      d = rand16();
      apply(d, '0, 0);
      for (int i = 0; i < 28; i++) apply(d, 28'(1) << i, 1);
      for (int i = 0; i < 27; i++) apply(d, 28'(3) << i, 2);
      for (int i = 0; i < 28; i++)
        for (int j = i + 2; j < 28; j++) apply(d, (28'(1) << i) | (28'(1) << j), 3);
      for (int i = 0; i < 26; i++) apply(d, 28'(7) << i, 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
