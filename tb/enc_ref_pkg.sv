// enc_ref_pkg - reference model of the 8B/10B encoder for the testbenches.
//
// Written independently of the RTL: both forms of every sub-block are listed
// explicitly (RD- form, RD+ form) as text strings in transmission order,
// and the alternate x.7 code is chosen by the run-length criterion (use it
// when e and i equal the first three bits of the primary fghj), not by a list
// of byte values.  Special characters are listed with both their RD- and RD+
// words.  The model keeps its own running disparity.
package enc_ref_pkg;

  // 5B/6B: "RD- RD+" per EDCBA, abcdei order
  localparam string T6 [32] = '{
    "100111 011000", "011101 100010", "101101 010010", "110001 110001",
    "110101 001010", "101001 101001", "011001 011001", "111000 000111",
    "111001 000110", "100101 100101", "010101 010101", "110100 110100",
    "001101 001101", "101100 101100", "011100 011100", "010111 101000",
    "011011 100100", "100011 100011", "010011 010011", "110010 110010",
    "001011 001011", "101010 101010", "011010 011010", "111010 000101",
    "110011 001100", "100110 100110", "010110 010110", "110110 001001",
    "001110 001110", "101110 010001", "011110 100001", "101011 010100"};

  // 3B/4B primary: "RD- RD+" per HGF, fghj order
  localparam string T4 [8] = '{
    "1011 0100", "1001 1001", "0101 0101", "1100 0011",
    "1101 0010", "1010 1010", "0110 0110", "1110 0001"};
  localparam string T4ALT = "0111 1000";

  // special characters: "RD- RD+" full words abcdei fghj
  localparam string TK [12] = '{
    "0011110100 1100001011", "0011111001 1100000110", "0011110101 1100001010",
    "0011110011 1100001100", "0011110010 1100001101", "0011111010 1100000101",
    "0011110110 1100001001", "0011111000 1100000111", "1110101000 0001010111",
    "1101101000 0010010111", "1011101000 0100010111", "0111101000 1000010111"};

  function automatic logic [9:0] bits_of(string s, int start, int n);
    logic [9:0] v;
    v = '0;
    for (int i = 0; i < n; i++) v = {v[8:0], (s[start+i] == "1")};
    return v;
  endfunction

  function automatic int ones(logic [9:0] v, int n);
    int c;
    c = 0;
    for (int i = 0; i < n; i++) c += int'(v[i]);
    return c;
  endfunction

  class enc_model;
    bit rd_pos;   // 1 = RD+

    function new();
      rd_pos = 0;
    endfunction

    // encode one byte, update disparity; ill = 1 for an illegal K byte
    function logic [9:0] encode(bit k, logic [7:0] b, output bit ill);
      logic [5:0] c6;
      logic [3:0] c4;
      logic [9:0] w;
      int sel;
      ill = 0;
      if (k) begin
        if (b > 8'd11) begin
          ill = 1;
          return 10'b0101010101;
        end
        w = bits_of(TK[b[3:0]], rd_pos ? 11 : 0, 10);
        if (ones(w, 10) != 5) rd_pos = ~rd_pos;
        return w;
      end
      sel = rd_pos ? 7 : 0;
      c6 = 6'(bits_of(T6[b[4:0]], sel, 6));
      if (ones(10'(c6), 6) != 3) rd_pos = ~rd_pos;
      sel = rd_pos ? 5 : 0;
      c4 = 4'(bits_of(T4[b[7:5]], sel, 4));
      if (b[7:5] == 3'd7 && c6[1] == c4[3] && c6[0] == c4[3])
        c4 = 4'(bits_of(T4ALT, sel, 4));
      if (ones(10'(c4), 4) != 2) rd_pos = ~rd_pos;
      return {c6, c4};
    endfunction
  endclass

endpackage
