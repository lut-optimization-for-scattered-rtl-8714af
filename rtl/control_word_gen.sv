// control_word_gen: control-word generator for the barrel shifters.
// Only the most significant one of the error magnitude is kept, so the error
// becomes a power of two and the multiplication x*e becomes a shift. The
// control word t is the number of leading zeros of the (L-1)-bit magnitude:
// t = 0 when its top bit is set, ..., t = L-2 when only bit 0 is set, and
// t = L-1 when the magnitude is zero (the barrel shifters then output 0).
// A priority encoder; purely combinational.
module control_word_gen #(
  parameter int unsigned L  = lms_pkg::L_BITS,
  parameter int unsigned TW = $clog2(L)
) (
  input  logic [L-2:0]  mag,
  output logic [TW-1:0] t
);
  always_comb begin
    t = TW'(L - 1);
    for (int i = 0; i < L - 1; i++)
      if (mag[i]) t = TW'(L - 2 - i);
  end
endmodule
