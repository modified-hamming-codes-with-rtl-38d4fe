// tb_daec_encoder: checks the DAEC check-bit generator against the published
// example (check bits 010100) and the row-wise reference; every word
// {data, check} must have a zero DAEC syndrome.
module tb_daec_encoder;
  import mhc_ref_pkg::*;

  logic [1:16] data;
  logic [1:6]  check;
  int checks = 0, failures = 0;

  daec_encoder dut (.data(data), .check(check));

  task automatic check_one(input logic [1:16] d);
    data = d;
    #1;
    checks++;
    if (check !== daec_check(d) || daec_syn({d, check}) != 6'b0) begin
      failures++;
      $display("FAIL data=%b check=%b exp=%b", d, check, daec_check(d));
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
    if (check !== 6'b010100) begin
      failures++;
      $display("FAIL example: %b", check);
    end
    check_one('0);
    check_one('1);
    for (int j = 1; j <= 16; j++) check_one(16'(1) << (16 - j));
    repeat (3000) check_one(rand16());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
