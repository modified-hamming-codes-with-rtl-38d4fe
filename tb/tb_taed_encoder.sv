// tb_taed_encoder: checks the (22,16) TAED encoder against the published
// example and against the row-wise reference for random and corner data words.
// Every code word must also have a zero syndrome and even overall parity.
module tb_taed_encoder;
  import mhc_ref_pkg::*;

  logic [1:16] data;
  logic [1:22] code;
  int checks = 0, failures = 0;

  taed_encoder dut (.data(data), .code(code));

  task automatic check_one(input logic [1:16] d);
    logic [1:22] exp;
    data = d;
    #1;
    exp = taed_encode(d);
    checks++;
    if (code !== exp || taed_syn(code) != 5'b0 || ^code) begin
      failures++;
      $display("FAIL data=%b code=%b exp=%b", d, code, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = EX_DATA;
    #1;
    checks++;
    if (code !== EX_CODE[1:22]) begin
      failures++;
      $display("FAIL example: %b expected %b", code, EX_CODE[1:22]);
    end
    check_one('0);
    check_one('1);
    for (int j = 1; j <= 16; j++) check_one(16'(1) << (16 - j));
    repeat (3000) check_one(rand16());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
