// barrel_shifter: one of the N barrel shifters of the weight-increment block.
// It multiplies a sample by the quantised error 2^-t: an arithmetic right
// shift of x by t places. The control word t is the leading-zero count of the
// error magnitude, and t = L-1 (all magnitude bits zero) means the error is
// zero, so the output is then 0. Built as log2(L) stages of 2:1 multiplexers,
// one stage per bit of t. Purely combinational.
module barrel_shifter #(
  parameter int unsigned L  = lms_pkg::L_BITS,
  parameter int unsigned TW = $clog2(L)
) (
  input  logic signed [L-1:0]  x,
  input  logic        [TW-1:0] t,
  output logic signed [L-1:0]  y
);
  logic signed [L-1:0] stage [TW+1];

  always_comb begin
    stage[0] = x;
    for (int b = 0; b < TW; b++)
      stage[b+1] = t[b] ? (stage[b] >>> (2 ** b)) : stage[b];
    y = (t == TW'(L - 1)) ? '0 : stage[TW];
  end
endmodule
