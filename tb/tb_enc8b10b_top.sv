// tb_enc8b10b_top - end-to-end test of the transmit path at its default
// size (16-word FIFO).  Bytes are encoded and buffered; the words read from
// the FIFO must be exactly the reference model's words for the bytes sent,
// in order, minus illegal special characters and minus words pushed while
// the FIFO was full (which must raise overflow).  The traffic goes through
// phases (write bursts with no reads, reads with no writes, random mix) so
// that each mechanism happens; the test counts each one and fails if any
// never happened: special character, illegal special character (kerror),
// alternate x.7 code, running-disparity change, idle input cycle, FIFO full,
// FIFO overflow, read while empty.
module tb_enc8b10b_top;
  import enc_ref_pkg::*;

  logic clk = 0, RSTn = 0, wr = 0, kin = 0, rd = 0;
  logic [7:0] dtin = '0;
  logic [9:0] dout, dtout;
  logic empty, full, overflow, kerror, dtout_vld, rd_pos;
  logic [9:0] enc_q[$];   // words expected out of the encoder
  logic [9:0] fifo_q[$];  // words expected in the FIFO
  int checks = 0, failures = 0;
  int n_k = 0, n_ill = 0, n_alt = 0, n_flip = 0, n_idle = 0, n_full = 0, n_ovf = 0, n_rd_empty = 0;
  int n_words = 0;
  bit ill, prev_rd, exp_ovf, push, pop;
  logic [9:0] w;
  enc_model m;

  enc8b10b_top dut (.clk(clk), .RSTn(RSTn), .wr(wr), .kin(kin), .dtin(dtin), .rd(rd),
                    .dout(dout), .empty(empty), .full(full), .overflow(overflow),
                    .kerror(kerror), .dtout(dtout), .dtout_vld(dtout_vld), .rd_pos(rd_pos));

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one clock: choose inputs (wr_pct, rd_pct in percent), model the result
  task automatic step(int wr_pct, int rd_pct);
    bit k;
    logic [7:0] b;
    int r;
    @(negedge clk);
    // FIFO side, seen before the edge
    chk(empty == (fifo_q.size() == 0), "empty flag");
    chk(full == (fifo_q.size() == 16), "full flag");
    if (fifo_q.size() > 0) chk(dout == fifo_q[0], $sformatf("FIFO head got %b exp %b", dout, fifo_q[0]));
    if (full) n_full++;
    push = dtout_vld && !kerror;
    exp_ovf = push && fifo_q.size() == 16;
    rd = ($urandom % 100) < rd_pct;
    pop = rd && fifo_q.size() > 0;
    if (rd && fifo_q.size() == 0) n_rd_empty++;
    // encoder side
    wr = ($urandom % 100) < wr_pct;
    r = $urandom % 16;
    k = (r < 2);
    b = (r == 0) ? 8'($urandom % 12) : (r == 1) ? 8'(12 + $urandom % 244) :
        (r < 5) ? {3'b111, 5'($urandom)} : 8'($urandom);
    kin = k; dtin = b;
    if (wr) begin
      prev_rd = m.rd_pos;
      w = m.encode(k, b, ill);
      enc_q.push_back(ill ? 10'b0101010101 : w);
      if (ill) n_ill++;
      else if (k) n_k++;
      if (!k && b[7:5] == 3'd7 && (w[3:0] == 4'b0111 || w[3:0] == 4'b1000)) n_alt++;
      if (m.rd_pos != prev_rd) n_flip++;
    end else n_idle++;
    @(posedge clk);
    if (pop) void'(fifo_q.pop_front());
    if (push && !exp_ovf) fifo_q.push_back(dtout);
    #1;
    chk(overflow == exp_ovf, "overflow flag");
    if (overflow) n_ovf++;
    if (wr) begin
      chk(dtout_vld, "dtout_vld one clock after wr");
      w = enc_q.pop_front();
      chk(dtout == w, $sformatf("encoder word got %b exp %b", dtout, w));
      chk(kerror == ill, "kerror");
      chk(rd_pos == m.rd_pos, "running disparity");
      n_words++;
    end else begin
      chk(!dtout_vld && !kerror, "no word when idle");
    end
  endtask

  initial begin
    m = new();
    repeat (3) @(posedge clk);
    RSTn = 1;
    for (int phase = 0; phase < 30; phase++) begin
      for (int i = 0; i < 100; i++) begin
        case (phase % 3)
          0: step(90, 0);    // fill: overflow
          1: step(0, 90);    // drain: read while empty
          default: step(60, 60);
        endcase
      end
    end
    $display("words=%0d K=%0d illegalK=%0d alt7=%0d rd_changes=%0d idle=%0d full=%0d overflow=%0d read_empty=%0d",
             n_words, n_k, n_ill, n_alt, n_flip, n_idle, n_full, n_ovf, n_rd_empty);
    chk(n_k > 0, "special character sent");
    chk(n_ill > 0, "illegal special character seen");
    chk(n_alt > 0, "alternate x.7 used");
    chk(n_flip > 0, "running disparity changed");
    chk(n_idle > 0, "idle cycle");
    chk(n_full > 0, "FIFO full");
    chk(n_ovf > 0, "FIFO overflow");
    chk(n_rd_empty > 0, "read while empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
