// enc8b10b - the 8B/10B encoder: special-character detection, 5B/6B and
// 3B/4B look-ups, and running-disparity control.
//
// Interface: clk, RSTn (asynchronous, active low), wr (byte valid), kin
// (dtin is a special-character index), dtin[7:0] = HGFEDCBA.  Outputs:
// dtout[9:0] = abcdeifghj with 'a' in bit 9, dtout_vld, kerror (illegal
// special character) and rd_pos (current running disparity, 1 = RD+).
// EDCBA goes to the 5B/6B look-up (giving abcdei), HGF to the 3B/4B look-up
// (giving fghj); the K detector checks kin/dtin; rd_control picks the forms
// and registers the word.  One byte per clock, latency one clock edge.
// The split into these four parts and the port names follow the design.
module enc8b10b
  import enc_pkg::*;
(
  input  logic       clk,
  input  logic       RSTn,
  input  logic       wr,
  input  logic       kin,
  input  logic [BYTE_W-1:0] dtin,
  output code10_t    dtout,
  output logic       dtout_vld,
  output logic       kerror,
  output logic       rd_pos
);

  code6_t  c6_n, c6_p;
  code4_t  c4_n, c4_p;
  code10_t kcode_n;
  logic    is_k, illegal;

  enc_5b6b u_5b6b (
    .edcba (dtin[4:0]),
    .code_n(c6_n),
    .code_p(c6_p)
  );

  enc_3b4b u_3b4b (
    .hgf   (dtin[7:5]),
    .edcba (dtin[4:0]),
    .code_n(c4_n),
    .code_p(c4_p)
  );

  k_detect u_kdet (
    .clk    (clk),
    .RSTn   (RSTn),
    .wr     (wr),
    .kin    (kin),
    .dtin   (dtin),
    .is_k   (is_k),
    .illegal(illegal),
    .kcode_n(kcode_n),
    .kerror (kerror)
  );

  rd_control u_rd (
    .clk      (clk),
    .RSTn     (RSTn),
    .wr       (wr),
    .is_k     (is_k),
    .illegal  (illegal),
    .kcode_n  (kcode_n),
    .c6_n     (c6_n),
    .c6_p     (c6_p),
    .c4_n     (c4_n),
    .c4_p     (c4_p),
    .dtout    (dtout),
    .dtout_vld(dtout_vld),
    .rd_pos   (rd_pos)
  );

endmodule
