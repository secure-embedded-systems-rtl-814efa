// shift_rows: the AES ShiftRows transformation, or InvShiftRows when
// INVERSE is set.
//
// Row r of the 4x4 state is rotated cyclically by r bytes: to the left for
// encryption, to the right for decryption.  Row 0 is unchanged.  The state
// is column-major (byte k is row k%4, column k/4), so the rotation is a
// fixed byte permutation: pure wiring, no clock, zero latency.  The shifts
// are the standard ones; sharing one module for both directions through a
// parameter is this design's choice.
module shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  state_t din,
  output state_t dout
);

  always_comb begin
    dout = '0;
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        // Source column for output (r, c).
        int unsigned src_c;
        src_c = INVERSE ? (c + 4 - r) % 4 : (c + r) % 4;
        dout[127-8*(4*c+r) -: 8] = din[127-8*(4*src_c+r) -: 8];
      end
    end
  end

endmodule
