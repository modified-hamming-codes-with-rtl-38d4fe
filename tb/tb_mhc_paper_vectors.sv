// tb_mhc_paper_vectors: replays the published encoder and decoder simulations
// on mhc_codec, one vector per 100 ns as in those runs, and compares every
// printed value: the encoder's d, out, out1, out2 and, for the four read words
// (no error, single error in bit 5, double adjacent error in bits 5-6, triple
// adjacent error in bits 1-3), the decoder's out, p1, p2, error and the flags
// single, double adjacent, triple adjacent, double error and resend.
module tb_mhc_paper_vectors;
  timeunit 1ns;
  timeprecision 1ps;
  import mhc_pkg::status_t;
  import mhc_pkg::diag_t;

  logic [1:16] wr_data, rd_data;
  logic [1:28] wr_code, rd_code;
  status_t     rd_status;
  diag_t       rd_diag;
  int checks = 0, failures = 0;

  mhc_codec dut (
    .wr_data(wr_data), .wr_code(wr_code),
    .rd_code(rd_code), .rd_data(rd_data), .rd_status(rd_status), .rd_diag(rd_diag)
  );

  typedef struct {
    logic [1:28] word;
    logic [1:5]  p1;
    logic [1:6]  p2;
    logic        error, single_err, double_adj, triple_adj, double_err, resend;
  } vec_t;

  localparam logic [1:16] DATA = 16'b1011101110111011;

  vec_t v [4] = '{
    '{28'b1110011110111101110110010100, 5'b00000, 6'b000000, 0, 0, 0, 0, 0, 0},
    '{28'b1110111110111101110110010100, 5'b00111, 6'b100011, 1, 1, 0, 0, 0, 0},
    '{28'b1110101110111101110110010100, 5'b01110, 6'b101000, 1, 0, 1, 0, 0, 0},
    '{28'b0000011110111101110110010100, 5'b00110, 6'b101100, 1, 0, 0, 1, 0, 1}
  };

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_data = DATA;
    rd_code = v[0].word;
    #50;
    check("encoder out",  wr_code == 28'b1110011110111101110110010100);
    check("encoder out1", wr_code[1:22] == 22'b1110011110111101110110);
    check("encoder out2", {wr_data, wr_code[23:28]} == 22'b1011101110111011010100);
    for (int t = 0; t < 4; t++) begin
      rd_code = v[t].word;
      #50;
      check($sformatf("p1 of word %0d", t), rd_diag.p1 == v[t].p1);
      check($sformatf("p2 of word %0d", t), rd_diag.p2 == v[t].p2);
      check($sformatf("error of word %0d", t), rd_status.error == v[t].error);
      check($sformatf("single of word %0d", t), rd_status.single_err == v[t].single_err);
      check($sformatf("double adjacent of word %0d", t), rd_status.double_adj == v[t].double_adj);
      check($sformatf("triple adjacent of word %0d", t), rd_status.triple_adj == v[t].triple_adj);
      check($sformatf("double error of word %0d", t), rd_status.double_err == v[t].double_err);
      check($sformatf("resend of word %0d", t), rd_status.resend == v[t].resend);
      if (!v[t].resend) check($sformatf("data of word %0d", t), rd_data == DATA);
      check($sformatf("DAEC data of word %0d", t), rd_diag.out2 == DATA);
      #50;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
