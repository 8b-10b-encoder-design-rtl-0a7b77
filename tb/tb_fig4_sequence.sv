// tb_fig4_sequence - replays the byte sequence of the published simulation
// waveform through the whole transmit path (default parameters):
//   kin=1 dtin=11100011 (not a special character)  -> kerror, 0101010101
//   kin=0 dtin=00100110 (D6.1)                      -> 0110011001
//   kin=0 dtin=00110001 (D17.1)                     -> 1000111001
//   wr low, dtin=10011000                           -> no word
// then checks that the FIFO holds exactly the two data words, in order, and
// that reading them empties it.  One byte per clock, one clock of latency.
module tb_fig4_sequence;
  logic clk = 0, RSTn = 0, wr = 0, kin = 0, rd = 0;
  logic [7:0] dtin = '0;
  logic [9:0] dout, dtout;
  logic empty, full, overflow, kerror, dtout_vld, rd_pos;
  int checks = 0, failures = 0;

  enc8b10b_top dut (.clk(clk), .RSTn(RSTn), .wr(wr), .kin(kin), .dtin(dtin), .rd(rd),
                    .dout(dout), .empty(empty), .full(full), .overflow(overflow),
                    .kerror(kerror), .dtout(dtout), .dtout_vld(dtout_vld), .rd_pos(rd_pos));

  always #20 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic apply(bit w, bit k, logic [7:0] b);
    @(negedge clk);
    wr = w; kin = k; dtin = b;
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    RSTn = 1;
    apply(1, 1, 8'b11100011);
    chk(dtout_vld && kerror && dtout == 10'b0101010101, $sformatf("illegal K: kerror=%b dtout=%b", kerror, dtout));
    apply(1, 0, 8'b00100110);
    chk(dtout_vld && !kerror && dtout == 10'b0110011001, $sformatf("D6.1: %b", dtout));
    apply(1, 0, 8'b00110001);
    chk(dtout_vld && !kerror && dtout == 10'b1000111001, $sformatf("D17.1: %b", dtout));
    apply(0, 0, 8'b10011000);
    chk(!dtout_vld && !kerror, "wr low: no word");
    chk(!rd_pos, "neutral words keep RD-");
    // FIFO: two words, filler not stored
    @(negedge clk);
    chk(!empty && dout == 10'b0110011001, "FIFO head D6.1");
    rd = 1;
    @(negedge clk);
    chk(!empty && dout == 10'b1000111001, "FIFO second D17.1");
    @(negedge clk);
    rd = 0;
    chk(empty, "FIFO empty after two reads");
    chk(!overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
