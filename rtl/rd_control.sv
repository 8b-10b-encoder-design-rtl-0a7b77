// rd_control - running-disparity (RD) control and output register.
//
// Keeps the running disparity of the line (rd_pos = 1 for RD+, 0 for RD-;
// RD- after reset) and builds each 10-bit word from the two forms of each
// sub-block offered by the 5B/6B and 3B/4B look-ups, or from the special
// character's RD- word.
//
//  - data byte: the 6-bit form is picked by the current RD; RD flips if that
//    form is unbalanced.  The 4-bit form is then picked by that intermediate
//    RD, and RD flips again if it is unbalanced.  This covers the four cases
//    of single-valued / two-valued 6-bit and 4-bit sub-blocks.
//  - legal special character: the RD- word is sent as is, or complemented
//    for RD+; RD flips if the word is unbalanced.
//  - illegal special character: the balanced filler 0101010101 is sent and
//    RD is left alone.
//
// Timing: one rising clk edge from a byte with wr high to its dtout, with
// dtout_vld high in that cycle.  With wr low, dtout is cleared, dtout_vld is
// low and RD holds.  RSTn is asynchronous and active low.  The RD rules and
// the filler word follow the design; the clearing of dtout with wr low is
// this implementation's choice.
module rd_control
  import enc_pkg::*;
(
  input  logic    clk,
  input  logic    RSTn,
  input  logic    wr,
  input  logic    is_k,
  input  logic    illegal,
  input  code10_t kcode_n,
  input  code6_t  c6_n,
  input  code6_t  c6_p,
  input  code4_t  c4_n,
  input  code4_t  c4_p,
  output code10_t dtout,
  output logic    dtout_vld,
  output logic    rd_pos
);

  code10_t word_d;
  logic    rd_d;
  code6_t  c6;
  code4_t  c4;
  logic    rd_mid;

  always_comb begin
    c6     = rd_pos ? c6_p : c6_n;
    rd_mid = rd_pos ^ (ones6(c6) != 3'd3);
    c4     = rd_mid ? c4_p : c4_n;
    if (illegal) begin
      word_d = FILLER;
      rd_d   = rd_pos;
    end else if (is_k) begin
      word_d = rd_pos ? ~kcode_n : kcode_n;
      rd_d   = rd_pos ^ (ones10(kcode_n) != 4'd5);
    end else begin
      word_d = {c6, c4};
      rd_d   = rd_mid ^ (ones4(c4) != 3'd2);
    end
  end

  always_ff @(posedge clk or negedge RSTn) begin
    if (!RSTn) begin
      dtout     <= '0;
      dtout_vld <= 1'b0;
      rd_pos    <= 1'b0;
    end else begin
      dtout_vld <= wr;
      if (wr) begin
        dtout  <= word_d;
        rd_pos <= rd_d;
      end else begin
        dtout  <= '0;
      end
    end
  end

  // every word sent is balanced or off by two ones
  a_disp: assert property (@(posedge clk) disable iff (!RSTn)
    dtout_vld |-> (ones10(dtout) inside {4'd4, 4'd5, 4'd6}));

endmodule
