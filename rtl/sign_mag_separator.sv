// sign_mag_separator: splits the scaled error mu*e (L-bit two's complement)
// into its sign bit and an (L-1)-bit magnitude. The sign steers the
// adder/subtractor cells; the magnitude feeds the control-word generator. The
// one value whose magnitude does not fit, -2^(L-1), is given the largest
// magnitude 2^(L-1)-1 (a design choice). Purely combinational.
module sign_mag_separator #(
  parameter int unsigned L = lms_pkg::L_BITS
) (
  input  logic signed [L-1:0] mu_e,
  output logic                sign,
  output logic        [L-2:0] mag
);
  logic [L-1:0] abs_v;

  always_comb begin
    sign  = mu_e[L-1];
    abs_v = sign ? (~mu_e + 1'b1) : mu_e;
    mag   = abs_v[L-1] ? '1 : abs_v[L-2:0];
  end
endmodule
