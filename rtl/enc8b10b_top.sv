// enc8b10b_top - transmit path: special-character detection and 8B/10B
// encoding followed by a FIFO buffer of code words.
//
// Bytes enter on dtin with wr (and kin for a special character).  The
// encoder turns each into a 10-bit DC-balanced word one clock later (dtout,
// dtout_vld, kerror are brought out as well), and every valid word that is
// not the filler of an illegal special character is written into the FIFO.
// The line side reads words from dout with rd while empty is low.  A word
// arriving while the FIFO is full is lost and flagged on overflow.
// The three-stage structure follows the design; the FIFO depth, dropping of
// illegal characters and the overflow flag are this implementation's choices.
module enc8b10b_top
  import enc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       RSTn,
  input  logic       wr,
  input  logic       kin,
  input  logic [BYTE_W-1:0] dtin,
  input  logic       rd,
  output code10_t    dout,
  output logic       empty,
  output logic       full,
  output logic       overflow,
  output logic       kerror,
  output code10_t    dtout,
  output logic       dtout_vld,
  output logic       rd_pos
);

  enc8b10b u_enc (
    .clk      (clk),
    .RSTn     (RSTn),
    .wr       (wr),
    .kin      (kin),
    .dtin     (dtin),
    .dtout    (dtout),
    .dtout_vld(dtout_vld),
    .kerror   (kerror),
    .rd_pos   (rd_pos)
  );

  sync_fifo #(
    .WIDTH(CODE_W),
    .DEPTH(FIFO_DEPTH)
  ) u_fifo (
    .clk     (clk),
    .RSTn    (RSTn),
    .wr_en   (dtout_vld && !kerror),
    .din     (dtout),
    .rd_en   (rd),
    .dout    (dout),
    .empty   (empty),
    .full    (full),
    .overflow(overflow)
  );

endmodule
