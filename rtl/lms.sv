// lms: DA-based delayed LMS adaptive FIR filter, N = 4 taps, L = 16 bits.
// The filter output y(n) = sum_k w_k * x(n-k) is computed by distributed
// arithmetic: a DA table of all 15 sums of the 4 latest samples is addressed
// by one bit slice of the 4 weights per bit cycle, and the selected partial
// sums are shift-accumulated in carry-save form, LSB slice first and MSB slice
// (subtracted) last. One output therefore takes L bit cycles; the filter
// accepts one sample every L clock cycles. While the table is read, the
// weights are updated in parallel by the LMS rule with mu = 2^-i/N and the
// error quantised to its leading one (a shift instead of a multiply):
//   w_k(n+1) = w_k(n) + sign(e) * x(n-2-k) * 2^(floor(log2|mu*e(n-2)|))
// using the error two sample periods old (adaptation delay 2).
// Numbers: samples, desired samples and weights are L-bit two's complement
// fractions in [-1, 1) (LSB = 2^-(L-1)).
// Interface (clk is the bit clock; en freezes the whole filter):
//   sample_tick : high in the last bit cycle of a sample period; data_in and
//                 desired_in are taken at the end of that cycle
//   data_in     : x(n+1), the newest reference sample
//   desired_in  : d(n), the desired sample one behind data_in
//   step_size   : i, extra right shift of the step size (0 gives mu = 1/N)
//   error_out   : mu*e = e/N of the latest complete sample (registered)
//   y_out       : filter output y(n-1) (combinational, L+2 bits)
//   weights     : the current weights w_0 .. w_(N-1)
// Timing: x enters at tick T; the output using it as x(n) is in y_out from
// tick T+1 to T+2 and the matching mu*e is in error_out after tick T+2.
// The single clock with a sample-rate enable replaces a separate slow
// sample clock; the ports y_out, weights and sample_tick are additions for
// observing the filter.
module lms #(
  parameter int unsigned L = lms_pkg::L_BITS,
  parameter int unsigned N = lms_pkg::N_TAPS
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [L-1:0] data_in,
  input  logic signed [L-1:0] desired_in,
  input  logic        [L-1:0] step_size,
  output logic signed [L-1:0] error_out,
  output logic signed [L+$clog2(N)-1:0] y_out,
  output logic signed [L-1:0] weights [N],
  output logic                sample_tick
);
  localparam int unsigned G  = $clog2(N);
  localparam int unsigned W  = L + G;
  localparam int unsigned TW = $clog2(L);

  logic [$clog2(L)-1:0] bit_idx;
  logic                 first, last, tick;
  logic        [N-1:0]  a_slice;
  logic        [W-1:0]  s_q, c_q;
  logic signed [L-1:0]  x_tap [N];
  logic signed [L-1:0]  x_old [2];
  logic signed [L-1:0]  x_upd [N];
  logic signed [L-1:0]  mu_e;
  logic                 e_sign;
  logic        [L-2:0]  e_mag;
  logic        [TW-1:0] t;

  bit_timer #(.L(L)) u_timer (
    .clk, .rst, .en, .bit_idx, .first, .last, .tick
  );

  inner_product #(.L(L), .N(N), .W(W)) u_ip (
    .clk, .rst, .en, .first, .last, .tick, .x_in(data_in), .a_slice,
    .s_out(s_q), .c_out(c_q), .x_tap
  );

  error_unit #(.L(L), .G(G), .W(W)) u_err (
    .clk, .rst, .tick, .s_in(s_q), .c_in(c_q), .d_in(desired_in),
    .y(y_out), .e(), .mu_e
  );

  sign_mag_separator #(.L(L)) u_smag (
    .mu_e, .sign(e_sign), .mag(e_mag)
  );

  control_word_gen #(.L(L), .TW(TW)) u_cwg (
    .mag(e_mag), .t
  );

  // the two samples older than the DA table, x(n-N) and x(n-N-1)
  always_ff @(posedge clk) begin
    if (rst) begin
      x_old[0] <= '0;
      x_old[1] <= '0;
    end else if (tick) begin
      x_old[0] <= x_tap[N-1];
      x_old[1] <= x_old[0];
    end
  end

  // weight w_k is updated with x(n-2-k)
  always_comb begin
    for (int k = 0; k < N; k++)
      x_upd[k] = (k + 2 < N) ? x_tap[k+2] : x_old[k+2-N];
  end

  weight_increment #(.L(L), .N(N), .TW(TW)) u_wi (
    .clk, .rst, .update(tick), .x_in(x_upd), .t, .sign(e_sign),
    .step_shift(step_size), .bit_idx, .a_slice, .w(weights)
  );

  assign error_out   = mu_e;
  assign sample_tick = tick;
endmodule
