// tb_rd_control - drives the running-disparity control with sub-block forms
// taken from the reference tables (random bytes, random special characters,
// illegal special characters, idle cycles) and compares dtout, dtout_vld and
// rd_pos with the reference model after every clock.
module tb_rd_control;
  import enc_ref_pkg::*;

  logic clk = 0, RSTn = 0, wr = 0, is_k = 0, illegal = 0;
  logic [9:0] kcode_n = '0;
  logic [5:0] c6_n = '0, c6_p = '0;
  logic [3:0] c4_n = '0, c4_p = '0;
  logic [9:0] dtout;
  logic dtout_vld, rd_pos;
  logic [9:0] exp_w;
  logic [5:0] w6;
  int checks = 0, failures = 0;
  int n_flip = 0;
  bit ill, k, prev_rd;
  logic [7:0] b;
  enc_model m;

  rd_control dut (.clk(clk), .RSTn(RSTn), .wr(wr), .is_k(is_k), .illegal(illegal),
                  .kcode_n(kcode_n), .c6_n(c6_n), .c6_p(c6_p), .c4_n(c4_n), .c4_p(c4_p),
                  .dtout(dtout), .dtout_vld(dtout_vld), .rd_pos(rd_pos));

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    m = new();
    repeat (2) @(posedge clk);
    #1;
    chk(rd_pos == 0 && dtout_vld == 0, "reset state");
    RSTn = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr = ($urandom % 8) != 0;
      k  = ($urandom % 6) == 0;
      b  = k ? 8'($urandom % 14) : 8'($urandom);
      is_k    = k && b <= 11;
      illegal = k && b > 11;
      kcode_n = (k && b <= 11) ? bits_of(TK[b[3:0]], 0, 10) : 10'($urandom);
      c6_n = 6'(bits_of(T6[b[4:0]], 0, 6));
      c6_p = 6'(bits_of(T6[b[4:0]], 7, 6));
      c4_n = 4'(bits_of(T4[b[7:5]], 0, 4));
      c4_p = 4'(bits_of(T4[b[7:5]], 5, 4));
      if (b[7:5] == 3'd7) begin
        w6 = c6_n;
        if (ones(10'(w6), 6) == 3 && w6[1:0] == 2'b11) c4_n = 4'(bits_of(T4ALT, 0, 4));
        w6 = c6_p;
        if (ones(10'(w6), 6) == 3 && w6[1:0] == 2'b00) c4_p = 4'(bits_of(T4ALT, 5, 4));
      end
      prev_rd = m.rd_pos;
      if (wr) exp_w = m.encode(k, b, ill);
      else    exp_w = '0;
      if (m.rd_pos != prev_rd) n_flip++;
      @(posedge clk);
      #1;
      chk(dtout_vld == wr, $sformatf("vld cycle %0d", i));
      chk(dtout == exp_w, $sformatf("dtout cycle %0d k=%0d b=%02h got %b exp %b", i, k, b, dtout, exp_w));
      chk(rd_pos == m.rd_pos, $sformatf("rd cycle %0d", i));
    end
    chk(n_flip > 100, "running disparity changed often");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
