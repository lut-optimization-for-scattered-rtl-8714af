// lut_mux: the 2^N-to-1 multiplexer of the inner-product block (16-to-1 for
// N = 4). The address is the weight bit slice A = {w3l, w2l, w1l, w0l}: bit k
// of A is bit l of weight w_k, and selects whether x(n-k) is part of the
// partial inner product y_l = sum_k w_kl * x(n-k) read from the DA table.
// Purely combinational.
module lut_mux #(
  parameter int unsigned N = lms_pkg::N_TAPS,
  parameter int unsigned W = lms_pkg::L_BITS + $clog2(N)
) (
  input  logic signed [W-1:0] entry [2**N],
  input  logic        [N-1:0] sel,
  output logic signed [W-1:0] y
);
  assign y = entry[sel];
endmodule
