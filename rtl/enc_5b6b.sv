// enc_5b6b - 5B/6B sub-block encoder of the 8B/10B code.
//
// Maps the low five input bits EDCBA to the six code bits abcdei by table
// look-up.  Both forms are produced at once: code_n is the one sent while the
// running disparity is negative (RD-), code_p the one for RD+.  For the
// balanced (three-ones) codes both forms are equal, except D.7 whose two forms
// 111000/000111 are complements; for the unbalanced codes the RD+ form is the
// complement of the RD- form.  Choosing between them is left to rd_control.
//
// Purely combinational, no clock.  The look-up approach follows the design;
// the table contents are the standard 8B/10B 5B/6B table (Widmer/Franaszek),
// which this design uses unchanged.
module enc_5b6b
  import enc_pkg::*;
(
  input  logic [4:0] edcba,
  output code6_t     code_n,
  output code6_t     code_p
);

  always_comb begin
    unique case (edcba)
      5'd0:  code_n = 6'b100111;
      5'd1:  code_n = 6'b011101;
      5'd2:  code_n = 6'b101101;
      5'd3:  code_n = 6'b110001;
      5'd4:  code_n = 6'b110101;
      5'd5:  code_n = 6'b101001;
      5'd6:  code_n = 6'b011001;
      5'd7:  code_n = 6'b111000;
      5'd8:  code_n = 6'b111001;
      5'd9:  code_n = 6'b100101;
      5'd10: code_n = 6'b010101;
      5'd11: code_n = 6'b110100;
      5'd12: code_n = 6'b001101;
      5'd13: code_n = 6'b101100;
      5'd14: code_n = 6'b011100;
      5'd15: code_n = 6'b010111;
      5'd16: code_n = 6'b011011;
      5'd17: code_n = 6'b100011;
      5'd18: code_n = 6'b010011;
      5'd19: code_n = 6'b110010;
      5'd20: code_n = 6'b001011;
      5'd21: code_n = 6'b101010;
      5'd22: code_n = 6'b011010;
      5'd23: code_n = 6'b111010;
      5'd24: code_n = 6'b110011;
      5'd25: code_n = 6'b100110;
      5'd26: code_n = 6'b010110;
      5'd27: code_n = 6'b110110;
      5'd28: code_n = 6'b001110;
      5'd29: code_n = 6'b101110;
      5'd30: code_n = 6'b011110;
      default: code_n = 6'b101011; // D.31
    endcase
    // unbalanced codes and D.7 have a complemented RD+ form
    if (ones6(code_n) != 3'd3 || edcba == 5'd7) code_p = ~code_n;
    else                                        code_p = code_n;
  end

endmodule
