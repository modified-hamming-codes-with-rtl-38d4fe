// tb_syndrome_decoder: drives every 6-bit syndrome into the error locator at
// its default size (the 22-column DAEC matrix) and compares the locator with
// the reference: one bit for a column syndrome, two neighbouring bits for an
// adjacent-pair syndrome, nothing otherwise.
module tb_syndrome_decoder;
  import mhc_ref_pkg::*;

  logic [1:6]  syndrome;
  logic [1:22] locator;
  logic        single_match, adjacent_match;
  int checks = 0, failures = 0;
  int n_single = 0, n_adj = 0, n_none = 0;

  syndrome_decoder dut (
    .syndrome(syndrome), .locator(locator),
    .single_match(single_match), .adjacent_match(adjacent_match)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 64; s++) begin
      logic [1:22] exp;
      logic        es, ea;
      exp = '0;
      es  = 1'b0;
      ea  = 1'b0;
      for (int unsigned i = 1; i <= 22; i++)
        if (daec_col(i) == 6'(s)) begin
          exp[i] = 1'b1;
          es = 1'b1;
        end
      for (int unsigned i = 1; i < 22; i++)
        if ((daec_col(i) ^ daec_col(i + 1)) == 6'(s)) begin
          exp[i] = 1'b1;
          exp[i+1] = 1'b1;
          ea = 1'b1;
        end
      syndrome = 6'(s);
      #1;
      checks++;
      if (locator !== exp || single_match !== es || adjacent_match !== ea) begin
        failures++;
        $display("FAIL syndrome=%b locator=%b exp=%b", syndrome, locator, exp);
      end
      if (es) n_single++;
      else if (ea) n_adj++;
      else n_none++;
    end
    checks++;
    if (n_single != 22 || n_adj != 21) begin
      failures++;
      $display("FAIL: %0d single and %0d adjacent syndromes", n_single, n_adj);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
