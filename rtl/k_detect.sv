// k_detect - special-character (K code) detection and look-up.
//
// When kin is high the byte on dtin names one of the twelve special
// characters: dtin = 0x00..0x0B (HGF = 000, EDCBA = 0..11) selects K28.0 ..
// K28.7, K23.7, K27.7, K29.7, K30.7 in that order.  For a legal one, is_k is
// high and kcode_n gives its RD- code word (the RD+ word is the complement and
// is formed by rd_control).  Any other byte with kin high is illegal: the
// combinational flag 'illegal' tells rd_control to send the filler word, and
// kerror is registered with the code word, so it is high in the same cycle as
// the corresponding dtout.
//
// Timing: is_k, illegal, kcode_n are combinational from kin/dtin; kerror is
// loaded on each rising clk edge (cleared when wr is low), and cleared by the
// asynchronous active-low reset RSTn.  The table and the kin/dtin/kerror
// interface follow the design; the registered kerror, the reset style and the
// behaviour with wr low are this implementation's choices.
module k_detect
  import enc_pkg::*;
#(
  parameter int unsigned N_SPECIAL_P = N_SPECIAL
) (
  input  logic       clk,
  input  logic       RSTn,
  input  logic       wr,
  input  logic       kin,
  input  logic [BYTE_W-1:0] dtin,
  output logic       is_k,
  output logic       illegal,
  output code10_t    kcode_n,
  output logic       kerror
);

  logic legal_idx;

  always_comb begin
    legal_idx = (dtin < BYTE_W'(N_SPECIAL_P));
    is_k      = kin && legal_idx;
    illegal   = kin && !legal_idx;
    kcode_n   = kcode_rdn(dtin[3:0]);
  end

  always_ff @(posedge clk or negedge RSTn) begin
    if (!RSTn) kerror <= 1'b0;
    else       kerror <= wr && illegal;
  end

endmodule
