// tb_mhc_encoder: checks the 28-bit encoder on the published example (d, out,
// out1, out2 of the encoder simulation) and on random data against the
// reference model.
module tb_mhc_encoder;
  import mhc_ref_pkg::*;

  logic [1:16] data;
  logic [1:28] code;
  logic [1:22] taed_code, daec_code;
  int checks = 0, failures = 0;

  mhc_encoder dut (.data(data), .code(code), .taed_code(taed_code), .daec_code(daec_code));

  task automatic expect_eq(input string what, input logic [1:28] got, input logic [1:28] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = 16'b1011101110111011;
    #1;
    expect_eq("out",  code, 28'b1110011110111101110110010100);
    expect_eq("out1", {taed_code, 6'b0}, {22'b1110011110111101110110, 6'b0});
    expect_eq("out2", {daec_code, 6'b0}, {22'b1011101110111011010100, 6'b0});
    repeat (3000) begin
      data = rand16();
      #1;
      expect_eq("code", code, encode(data));
      expect_eq("taed", {taed_code, 6'b0}, {code[1:22], 6'b0});
      expect_eq("daec", {daec_code, 6'b0}, {data, code[23:28], 6'b0});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
