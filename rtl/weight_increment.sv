// weight_increment: weight-increment block of the DA LMS filter.
// It keeps the N weights and updates them once per sample period with the
// delayed, sign-magnitude LMS rule
//   w_k <= w_k +/- (x(n-2-k) >>> (1 + i + t))
// where the sign of mu*e(n-2) selects add (0) or subtract (1), t is the
// leading-zero count of |mu*e(n-2)| and i is the extra step-size shift.
// Datapath per weight: a fixed pre-shift of the sample by 1+i places, a
// barrel shifter (shift by t), an adder/subtractor and the weight register.
// The pre-shift by 1 aligns the product of two fractions (samples, errors and
// weights are all read as L-bit fractions); the pre-shift by i gives the
// smaller step size mu = 2^-i/N. The word-parallel bit-serial converter turns
// the weight registers into the bit slice a_slice for the inner-product block.
// Weights change at `update` (the sample-clock edge) and are read out bit by
// bit over the next L bit cycles; an assertion checks that they do not change
// between updates. Synchronous, active-high reset to zero.
module weight_increment #(
  parameter int unsigned L  = lms_pkg::L_BITS,
  parameter int unsigned N  = lms_pkg::N_TAPS,
  parameter int unsigned TW = $clog2(L)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 update,
  input  logic signed [L-1:0]  x_in [N],
  input  logic        [TW-1:0] t,
  input  logic                 sign,
  input  logic        [L-1:0]  step_shift,
  input  logic [$clog2(L)-1:0] bit_idx,
  output logic        [N-1:0]  a_slice,
  output logic signed [L-1:0]  w [N]
);
  logic signed [L-1:0] x_pre [N];
  logic signed [L-1:0] incr  [N];
  logic        [L:0]   pre_amt;

  assign pre_amt = {1'b0, step_shift} + 1'b1;

  for (genvar k = 0; k < N; k++) begin : g_lane
    assign x_pre[k] = x_in[k] >>> pre_amt;

    barrel_shifter #(.L(L), .TW(TW)) u_bs (
      .x(x_pre[k]), .t, .y(incr[k])
    );

    always_ff @(posedge clk) begin
      if (rst)
        w[k] <= '0;
      else if (update)
        w[k] <= sign ? (w[k] - incr[k]) : (w[k] + incr[k]);
    end

    // a weight changes only at a sample-clock edge, so the bit slices of one
    // inner product all come from the same weight
    a_hold: assert property (@(posedge clk) disable iff (rst) !update |=> $stable(w[k]));
  end

  bit_serial_converter #(.L(L), .N(N)) u_conv (
    .w, .bit_idx, .a_slice
  );
endmodule
