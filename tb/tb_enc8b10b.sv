// tb_enc8b10b - end-to-end check of the encoder.
//  1. The byte sequence of the design's published simulation: an illegal
//     special character (kin=1, dtin=11100011) gives kerror and the word
//     0101010101; then D6.1 (00100110) gives 0110011001 and D17.1
//     (00110001) gives 1000111001.
//  2. All twelve special characters in both disparities.
//  3. A long random stream of data and special characters compared word by
//     word with the reference model, with line properties checked on the
//     serial bit stream (bit 9 sent first): no run longer than five equal
//     bits, running digital sum always -1 or +1 at word boundaries.
// Also checks the one-clock latency (dtout_vld one edge after wr).
module tb_enc8b10b;
  import enc_ref_pkg::*;

  logic clk = 0, RSTn = 0, wr = 0, kin = 0;
  logic [7:0] dtin = '0;
  logic [9:0] dtout, exp_w;
  logic dtout_vld, kerror, rd_pos;
  int checks = 0, failures = 0;
  int run_len = 0, rds = -1, n_alt = 0;
  bit last_bit = 0, ill;
  enc_model m;

  enc8b10b dut (.clk(clk), .RSTn(RSTn), .wr(wr), .kin(kin), .dtin(dtin), .dtout(dtout),
                .dtout_vld(dtout_vld), .kerror(kerror), .rd_pos(rd_pos));

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // apply one byte, wait for the word, compare with the model
  task automatic send(bit k, logic [7:0] b);
    @(negedge clk);
    wr = 1; kin = k; dtin = b;
    exp_w = m.encode(k, b, ill);
    @(posedge clk);
    #1;
    chk(dtout_vld == 1, "latency: dtout_vld one edge after wr");
    chk(dtout == exp_w, $sformatf("k=%0d b=%02h got %b exp %b", k, b, dtout, exp_w));
    chk(kerror == ill, $sformatf("kerror k=%0d b=%02h", k, b));
    chk(rd_pos == m.rd_pos, $sformatf("rd k=%0d b=%02h", k, b));
    if (!ill) begin
      for (int i = 9; i >= 0; i--) begin
        if (dtout[i] == last_bit) run_len++;
        else run_len = 1;
        last_bit = dtout[i];
        rds += dtout[i] ? 1 : -1;
        if (run_len > 5) begin
          // comma K28.7 may make a run of five followed by five; never six
          chk(0, $sformatf("run of %0d after b=%02h", run_len, b));
        end
      end
      chk(rds == 1 || rds == -1, $sformatf("running sum %0d after b=%02h", rds, b));
      if (!k && b[7:5] == 3'd7 && (dtout[3:0] == 4'b0111 || dtout[3:0] == 4'b1000)) n_alt++;
    end
  endtask

  initial begin
    m = new();
    repeat (2) @(posedge clk);
    RSTn = 1;
    #1;
    chk(dtout_vld == 0 && rd_pos == 0, "reset: RD- and no output");
    // 1. published sequence
    send(1, 8'b11100011);
    chk(kerror == 1 && dtout == 10'b0101010101, "illegal K gives kerror and 0101010101");
    send(0, 8'b00100110);
    chk(dtout == 10'b0110011001, "D6.1 -> 0110011001");
    send(0, 8'b00110001);
    chk(dtout == 10'b1000111001, "D17.1 -> 1000111001");
    chk(kerror == 0, "kerror clears");
    @(negedge clk);
    wr = 0;
    @(posedge clk);
    #1;
    chk(dtout_vld == 0 && kerror == 0, "idle with wr low");
    // 2. special characters in both disparities
    for (int r = 0; r < 2; r++)
      for (int v = 0; v < 12; v++) begin
        send(1, 8'(v));
        send(0, 8'd0);   // D0.0 is unbalanced: alternates the disparity
      end
    // 3. random stream, biased towards x.7 and special characters
    for (int i = 0; i < 20000; i++) begin
      int r;
      r = $urandom % 16;
      if (r == 0)      send(1, 8'($urandom % 12));
      else if (r == 1) send(1, 8'($urandom));
      else if (r < 5)  send(0, {3'b111, 5'($urandom)});
      else             send(0, 8'($urandom));
    end
    chk(n_alt > 0, "alternate x.7 code used");
    $display("alternate x.7 codes sent: %0d", n_alt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
