// enc_pkg - constants and helper functions shared by the 8B/10B encoder blocks.
//
// Holds the code-word widths, the special-character (K) table and a few
// bit-count helpers.  A 10-bit code word is kept as {abcdei, fghj}: bit 9 is
// 'a' (the code bit that encodes input bit A), bit 0 is 'j'.
//
// The special-character table is the one of the design: twelve K characters,
// selected with kin=1 by the byte value 0x00..0x0B (HGF=000, EDCBA=index).
// For each one the table stores the word sent while the running disparity is
// negative (RD-); the RD+ word is its bitwise complement.
package enc_pkg;

  localparam int unsigned BYTE_W = 8;
  localparam int unsigned CODE_W = 10;
  localparam int unsigned N_SPECIAL = 12;

  typedef logic [CODE_W-1:0] code10_t;
  typedef logic [5:0]        code6_t;
  typedef logic [3:0]        code4_t;

  // Word sent for an illegal special character: a balanced filler that does
  // not change the running disparity.
  localparam code10_t FILLER = 10'b0101010101;

  // RD- code word {abcdei, fghj} of special character number idx (0..11):
  // K28.0..K28.7, K23.7, K27.7, K29.7, K30.7.
  function automatic code10_t kcode_rdn(input logic [3:0] idx);
    unique case (idx)
      4'd0:    return {6'b001111, 4'b0100}; // K28.0
      4'd1:    return {6'b001111, 4'b1001}; // K28.1
      4'd2:    return {6'b001111, 4'b0101}; // K28.2
      4'd3:    return {6'b001111, 4'b0011}; // K28.3
      4'd4:    return {6'b001111, 4'b0010}; // K28.4
      4'd5:    return {6'b001111, 4'b1010}; // K28.5
      4'd6:    return {6'b001111, 4'b0110}; // K28.6
      4'd7:    return {6'b001111, 4'b1000}; // K28.7
      4'd8:    return {6'b111010, 4'b1000}; // K23.7
      4'd9:    return {6'b110110, 4'b1000}; // K27.7
      4'd10:   return {6'b101110, 4'b1000}; // K29.7
      4'd11:   return {6'b011110, 4'b1000}; // K30.7
      default: return FILLER;
    endcase
  endfunction

  function automatic logic [3:0] ones10(input code10_t w);
    logic [3:0] n;
    n = '0;
    for (int i = 0; i < CODE_W; i++) n += 4'(w[i]);
    return n;
  endfunction

  function automatic logic [2:0] ones6(input code6_t w);
    logic [2:0] n;
    n = '0;
    for (int i = 0; i < 6; i++) n += 3'(w[i]);
    return n;
  endfunction

  function automatic logic [2:0] ones4(input code4_t w);
    logic [2:0] n;
    n = '0;
    for (int i = 0; i < 4; i++) n += 3'(w[i]);
    return n;
  endfunction

endpackage
