// bit_serial_converter: word-parallel bit-serial converter of the
// weight-increment block. It reads the N weight registers in parallel and
// gives, for bit cycle bit_idx, the bit slice A = {w_(N-1)l .. w_1l, w_0l}
// that addresses the DA table (bit k of A is bit l of weight w_k). Built as N
// L-to-1 bit multiplexers steered by the bit counter, so the weights written
// at a sample-clock edge are read out LSB first in the following period.
// Purely combinational.
module bit_serial_converter #(
  parameter int unsigned L = lms_pkg::L_BITS,
  parameter int unsigned N = lms_pkg::N_TAPS
) (
  input  logic signed [L-1:0]         w [N],
  input  logic        [$clog2(L)-1:0] bit_idx,
  output logic        [N-1:0]         a_slice
);
  always_comb begin
    for (int k = 0; k < N; k++) a_slice[k] = w[k][bit_idx];
  end
endmodule
