// tb_mhc_codec: end-to-end test of the error-corrected memory path at the
// design's full size (16-bit data, 28-bit code words).
// A 256-word memory model sits between the write side and the read side of
// mhc_codec. Every word is written through the encoder; then upsets are
// injected into stored words the way a multiple cell upset hits a row of
// cells: one cell, two adjacent cells, three adjacent cells, or two cells
// apart. Each word is read back through the decoder and checked: data intact
// where the code corrects, resend raised where it only detects. Every
// mechanism (clean read, single correction, double adjacent correction,
// double detection, triple adjacent detection, resend) must occur.
module tb_mhc_codec;
  import mhc_ref_pkg::*;
  import mhc_pkg::status_t;
  import mhc_pkg::diag_t;

  localparam int WORDS = 256;

  logic [1:16] wr_data, rd_data;
  logic [1:28] wr_code, rd_code;
  status_t     rd_status;
  diag_t       rd_diag;

  logic [1:28] mem   [WORDS];
  logic [1:16] golden[WORDS];
  int          kind  [WORDS];

  int checks = 0, failures = 0;
  int n_clean = 0, n_single = 0, n_dadj = 0, n_double = 0, n_triple = 0, n_resend = 0;

  mhc_codec dut (
    .wr_data(wr_data), .wr_code(wr_code),
    .rd_code(rd_code), .rd_data(rd_data), .rd_status(rd_status), .rd_diag(rd_diag)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // write phase
    for (int a = 0; a < WORDS; a++) begin
      wr_data = (a == 0) ? EX_DATA : rand16();
      #1;
      mem[a]    = wr_code;
      golden[a] = wr_data;
      checks++;
      if (wr_code !== encode(wr_data)) begin
        failures++;
        $display("FAIL write %0d: %b", a, wr_code);
      end
    end
    // upsets: kind 0 none, 1 single, 2 adjacent pair, 3 two cells apart, 4 adjacent triple
    for (int a = 0; a < WORDS; a++) begin
      int unsigned p, q;
      kind[a] = a % 5;
      p = $urandom_range(0, 25);
      case (kind[a])
        1: mem[a] ^= 28'(1) << p;
        2: mem[a] ^= 28'(3) << p;
        3: begin
          q = $urandom_range(p + 2, 27);
          mem[a] ^= (28'(1) << p) | (28'(1) << q);
        end
        4: mem[a] ^= 28'(7) << p;
        default: ;
      endcase
    end
    // read phase
    for (int a = 0; a < WORDS; a++) begin
      logic ok;
      rd_code = mem[a];
      #1;
      checks++;
      case (kind[a])
        0: ok = !rd_status.error && rd_data == golden[a];
        1: ok = rd_status.single_err && !rd_status.resend && rd_data == golden[a];
        2: ok = rd_status.double_adj && !rd_status.resend && rd_data == golden[a];
        3: ok = rd_status.double_err && rd_status.resend;
        default: ok = rd_status.triple_adj && rd_status.resend;
      endcase
      if (!ok) begin
        failures++;
        $display("FAIL read %0d kind %0d: data=%b status=%b", a, kind[a], rd_data, rd_status);
      end
      if (!rd_status.error) n_clean++;
      if (rd_status.single_err) n_single++;
      if (rd_status.double_adj) n_dadj++;
      if (rd_status.double_err) n_double++;
      if (rd_status.triple_adj) n_triple++;
      if (rd_status.resend) n_resend++;
    end
    $display("clean=%0d single=%0d double_adj=%0d double=%0d triple_adj=%0d resend=%0d",
             n_clean, n_single, n_dadj, n_double, n_triple, n_resend);
    checks++;
    if (n_clean == 0 || n_single == 0 || n_dadj == 0 || n_double == 0 || n_triple == 0 || n_resend == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
