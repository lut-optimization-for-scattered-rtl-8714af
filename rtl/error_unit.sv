// error_unit: output and error path of the DA LMS filter.
// The final adder resolves the carry-save result of the inner-product block,
//   y = S + 2*C + 1,
// where the carry-in 1 completes the two's complement of the MSB slice. The
// desired sample d is held one sample period in a register so that it meets
// the filter output it belongs to; the error is e = d - y (L+G bits, G =
// log2 N), and mu*e with mu = 1/N is e shifted right by G places, which leaves
// L bits. mu*e is registered at the sample-clock edge, so the weight update
// of period n uses mu*e(n-2).
//   s_in/c_in: sum and carry words of y(n-1), valid for the whole period
//   d_in     : desired sample d(n), loaded at tick
//   y, e     : filter output y(n-1) and error e(n-1), combinational
//   mu_e     : registered mu*e(n-2)
// The top bit of c_in is not read: in S + 2*C it falls outside the W-bit
// result, which is computed modulo 2^W.
// Synchronous, active-high reset to zero.
module error_unit #(
  parameter int unsigned L = lms_pkg::L_BITS,
  parameter int unsigned G = lms_pkg::GUARD,
  parameter int unsigned W = L + G
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                tick,
  input  logic        [W-1:0] s_in,
  input  logic        [W-1:0] c_in,
  input  logic signed [L-1:0] d_in,
  output logic signed [W-1:0] y,
  output logic signed [W-1:0] e,
  output logic signed [L-1:0] mu_e
);
  logic signed [L-1:0] d_q;

  always_comb begin
    y = s_in + {c_in[W-2:0], 1'b0} + W'(1);
    e = W'(d_q) - y;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      d_q  <= '0;
      mu_e <= '0;
    end else if (tick) begin
      d_q  <= d_in;
      mu_e <= e[W-1:G];
    end
  end
endmodule
