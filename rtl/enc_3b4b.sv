// enc_3b4b - 3B/4B sub-block encoder of the 8B/10B code.
//
// Maps the three high input bits HGF to the four code bits fghj by table
// look-up (the 3B/4B table of the design).  Both forms are produced: code_n
// is sent when the running disparity in front of the 4-bit sub-block (that is,
// after the 6-bit sub-block) is negative, code_p when it is positive.
// Values 1, 2, 5, 6 have one form; 0, 3, 4 have two complementary forms;
// 7 has four: the primary pair 1110/0001 and the alternate pair 0111/1000.
// The alternate pair is used where the primary one would make a run of five
// equal bits with the end of the 6-bit sub-block: for RD- after EDCBA = 17, 18,
// 20 and for RD+ after EDCBA = 11, 13, 14.  That selection rule is the
// standard 8B/10B one; the design lists the four codes but not the rule.
//
// Purely combinational.
module enc_3b4b
  import enc_pkg::*;
(
  input  logic [2:0] hgf,
  input  logic [4:0] edcba,
  output code4_t     code_n,
  output code4_t     code_p
);

  logic alt_n, alt_p;

  always_comb begin
    alt_n = (edcba == 5'd17) || (edcba == 5'd18) || (edcba == 5'd20);
    alt_p = (edcba == 5'd11) || (edcba == 5'd13) || (edcba == 5'd14);
    unique case (hgf)
      3'd0: begin code_n = 4'b1011; code_p = 4'b0100; end
      3'd1: begin code_n = 4'b1001; code_p = 4'b1001; end
      3'd2: begin code_n = 4'b0101; code_p = 4'b0101; end
      3'd3: begin code_n = 4'b1100; code_p = 4'b0011; end
      3'd4: begin code_n = 4'b1101; code_p = 4'b0010; end
      3'd5: begin code_n = 4'b1010; code_p = 4'b1010; end
      3'd6: begin code_n = 4'b0110; code_p = 4'b0110; end
      default: begin
        code_n = alt_n ? 4'b0111 : 4'b1110;
        code_p = alt_p ? 4'b1000 : 4'b0001;
      end
    endcase
  end

endmodule
