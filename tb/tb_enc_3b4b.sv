// tb_enc_3b4b - exhaustive check of the 3B/4B look-up (all 256 HGF/EDCBA
// pairs).  Expected codes come from the reference table in enc_ref_pkg; for
// HGF = 7 the alternate code is expected exactly where the 6-bit word sent in
// front of it (its RD- form for code_n, RD+ form for code_p, taken when that
// word is balanced) ends in two bits equal to the primary code's leading bits.
module tb_enc_3b4b;
  import enc_ref_pkg::*;

  logic [2:0] hgf;
  logic [4:0] edcba;
  logic [3:0] code_n, code_p;
  logic [3:0] exp_n, exp_p;
  logic [5:0] w6;
  int checks = 0, failures = 0;

  enc_3b4b dut (.hgf(hgf), .edcba(edcba), .code_n(code_n), .code_p(code_p));

  initial begin
    for (int v = 0; v < 256; v++) begin
      hgf   = 3'(v >> 5);
      edcba = 5'(v);
      exp_n = 4'(bits_of(T4[hgf], 0, 4));
      exp_p = 4'(bits_of(T4[hgf], 5, 4));
      if (hgf == 3'd7) begin
        // RD- in front of the 4-bit block: preceded by a balanced RD- word
        w6 = 6'(bits_of(T6[edcba], 0, 6));
        if (ones(10'(w6), 6) == 3 && w6[1:0] == 2'b11) exp_n = 4'(bits_of(T4ALT, 0, 4));
        w6 = 6'(bits_of(T6[edcba], 7, 6));
        if (ones(10'(w6), 6) == 3 && w6[1:0] == 2'b00) exp_p = 4'(bits_of(T4ALT, 5, 4));
      end
      #1;
      checks++;
      if (code_n !== exp_n) begin failures++; $display("FAIL %02h n got %b exp %b", v, code_n, exp_n); end
      checks++;
      if (code_p !== exp_p) begin failures++; $display("FAIL %02h p got %b exp %b", v, code_p, exp_p); end
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
