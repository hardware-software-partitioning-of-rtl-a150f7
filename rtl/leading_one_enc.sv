// leading_one_enc: priority encoder for the most significant one bit.
//
// pos is the index of the highest set bit of in_bits; valid is 0 (and pos 0)
// when in_bits is all zeros. Used by the Fixed-to-Float converter to find the
// leading one of the magnitude. Written as a scan from bit 0 upward in which the
// last set bit found wins; synthesis turns it into a priority tree.
// Purely combinational.
module leading_one_enc #(
  parameter int Width    = 32,
  parameter int PosWidth = (Width > 1) ? $clog2(Width) : 1
) (
  input  logic [Width-1:0]    in_bits,
  output logic [PosWidth-1:0] pos,
  output logic                valid
);

  always_comb begin
    pos   = '0;
    valid = 1'b0;
    for (int i = 0; i < Width; i++) begin
      if (in_bits[i]) begin
        pos   = PosWidth'(i);
        valid = 1'b1;
      end
    end
  end

endmodule
