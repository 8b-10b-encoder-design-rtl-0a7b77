// tb_enc_5b6b - exhaustive check of the 5B/6B look-up against the reference
// table in enc_ref_pkg (both RD- and RD+ forms of all 32 inputs), plus the
// rule that every form has 2, 3 or 4 ones and that the RD- form never has
// fewer ones than the RD+ form.
module tb_enc_5b6b;
  import enc_ref_pkg::*;

  logic [4:0] edcba;
  logic [5:0] code_n, code_p;
  int checks = 0, failures = 0;

  enc_5b6b dut (.edcba(edcba), .code_n(code_n), .code_p(code_p));

  initial begin
    for (int v = 0; v < 32; v++) begin
      edcba = 5'(v);
      #1;
      checks++;
      if (code_n !== 6'(bits_of(T6[v], 0, 6))) begin
        failures++; $display("FAIL D%0d RD- got %b", v, code_n);
      end
      checks++;
      if (code_p !== 6'(bits_of(T6[v], 7, 6))) begin
        failures++; $display("FAIL D%0d RD+ got %b", v, code_p);
      end
      checks++;
      if (!(ones(10'(code_n), 6) inside {3, 4}) || !(ones(10'(code_p), 6) inside {2, 3})) begin
        failures++; $display("FAIL D%0d disparity", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
