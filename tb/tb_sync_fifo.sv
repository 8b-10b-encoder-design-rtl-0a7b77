// tb_sync_fifo - random pushes and pops against a queue model: head word,
// empty/full flags, overflow pulse on a push into a full FIFO, pops while
// empty ignored.  Uses a small depth and checks that full and empty are
// both reached.
module tb_sync_fifo;
  localparam int W = 10, D = 4;

  logic clk = 0, RSTn = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full, overflow;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_ovf = 0;
  bit exp_ovf;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk(clk), .RSTn(RSTn), .wr_en(wr_en), .din(din),
      .rd_en(rd_en), .dout(dout), .empty(empty), .full(full), .overflow(overflow));

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    RSTn = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), $sformatf("empty %0d", i));
      chk(full == (q.size() == D), $sformatf("full %0d", i));
      if (q.size() > 0) chk(dout == q[0], $sformatf("head %0d", i));
      if (full) n_full++;
      if (empty) n_empty++;
      // phases: fill-heavy, drain-heavy, mixed
      wr_en = ($urandom % 100) < ((i / 200) % 2 == 0 ? 80 : 25);
      rd_en = ($urandom % 100) < ((i / 200) % 2 == 0 ? 25 : 80);
      din   = W'($urandom);
      exp_ovf = wr_en && q.size() == D;
      @(posedge clk);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en && !exp_ovf) q.push_back(din);
      #1;
      chk(overflow == exp_ovf, $sformatf("overflow %0d", i));
      if (overflow) n_ovf++;
    end
    chk(n_full > 0 && n_empty > 0 && n_ovf > 0, "full, empty and overflow all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
