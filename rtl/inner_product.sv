// inner_product: four-point DA inner-product block (generic in N).
// It holds the DA table of the N latest samples, a 2^N-to-1 multiplexer
// addressed by the weight bit slice A, and the carry-save shift accumulator.
// Over the L bit cycles of a sample period the slices of the weights are
// applied LSB first; the MSB slice comes last, with sign control high, so the
// accumulator ends with
//   S + 2*C + 1 = floor( sum_k w_k * x(n-k) / 2^(L-1) )
// i.e. the inner product with the weights read as fractions in [-1, 1).
// At the end of the last bit cycle (tick) the finished sum and carry words are
// caught in the output registers s_out/c_out, and the DA table shifts in x_in
// at the same edge. s_out/c_out therefore hold the result of the previous
// sample period for the whole of the current one (one sample of latency).
// The final carry-propagate adder is outside this block.
//   x_in   : sample x(n+1), loaded at tick
//   a_slice: bit l of each weight, bit k of a_slice from weight w_k
//   x_tap  : x(n) .. x(n-N+1), the samples in the DA table
module inner_product #(
  parameter int unsigned L = lms_pkg::L_BITS,
  parameter int unsigned N = lms_pkg::N_TAPS,
  parameter int unsigned W = L + $clog2(N)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                first,
  input  logic                last,
  input  logic                tick,
  input  logic signed [L-1:0] x_in,
  input  logic        [N-1:0] a_slice,
  output logic        [W-1:0] s_out,
  output logic        [W-1:0] c_out,
  output logic signed [L-1:0] x_tap [N]
);
  logic signed [W-1:0] entry [2**N];
  logic signed [W-1:0] y_l;
  logic        [W-1:0] s_nxt, c_nxt;

  da_table #(.L(L), .N(N), .W(W)) u_table (
    .clk, .rst, .load(tick), .x_in, .entry, .x_tap
  );

  lut_mux #(.N(N), .W(W)) u_mux (
    .entry, .sel(a_slice), .y(y_l)
  );

  csa_accumulator #(.W(W)) u_csa (
    .clk, .rst, .en, .first, .sign_ctrl(last), .p_in(y_l), .s_nxt, .c_nxt
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      // S = -1, C = 0: with the carry-in of 1 the reset result reads as 0
      s_out <= '1;
      c_out <= '0;
    end else if (tick) begin
      s_out <= s_nxt;
      c_out <= c_nxt;
    end
  end
endmodule
