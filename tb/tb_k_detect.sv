// tb_k_detect - checks special-character detection for every dtin with kin
// high and low: is_k / illegal flags, the RD- word against the reference
// table, that the table's RD+ word is its complement, and that kerror
// follows an illegal byte one clock later only when wr is high.
module tb_k_detect;
  import enc_ref_pkg::*;

  logic clk = 0, RSTn = 0, wr = 0, kin = 0;
  logic [7:0] dtin = '0;
  logic is_k, illegal, kerror;
  logic [9:0] kcode_n;
  int checks = 0, failures = 0;
  bit exp_ill;

  k_detect dut (.clk(clk), .RSTn(RSTn), .wr(wr), .kin(kin), .dtin(dtin),
                .is_k(is_k), .illegal(illegal), .kcode_n(kcode_n), .kerror(kerror));

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    RSTn = 1;
    for (int k = 0; k < 2; k++) begin
      for (int v = 0; v < 256; v++) begin
        @(negedge clk);
        kin  = k[0];
        dtin = 8'(v);
        wr   = (v % 3) != 0;
        #1;
        exp_ill = (k == 1) && (v > 11);
        chk(is_k == ((k == 1) && (v <= 11)), $sformatf("is_k k=%0d v=%0d", k, v));
        chk(illegal == exp_ill, $sformatf("illegal k=%0d v=%0d", k, v));
        if (k == 1 && v <= 11) begin
          chk(kcode_n == bits_of(TK[v], 0, 10), $sformatf("K%0d RD- %b", v, kcode_n));
          chk(~kcode_n == bits_of(TK[v], 11, 10), $sformatf("K%0d RD+", v));
        end
        @(posedge clk);
        #1;
        chk(kerror == (exp_ill && wr), $sformatf("kerror k=%0d v=%0d", k, v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
