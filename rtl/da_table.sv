// da_table: DA table of the inner-product block, a bank of 2^N-1 registers
// holding every sum of a subset of the N latest input samples.
// Entry k (1 <= k < 2^N) holds sum over j of x(n-j) for each bit j set in k;
// entry 0 is the constant zero. When `load` is high a new sample x(n+1) is
// shifted in and all entries are refreshed in that one sample clock:
//   k even : new entry k = old entry k/2           (a plain register shift)
//   k odd  : new entry k = x(n+1) + old entry k/2  (one adder each)
// For N = 4 this is 15 registers and 7 adders, refreshed in parallel, so the
// table never takes extra cycles to update. The taps x(n-j) are the entries
// 2^j, brought out for the weight-increment path.
// Words are sign-extended to L+$clog2(N) bits (all entries share the widest
// width; the narrower entries of the structure only hold fewer significant
// bits). Synchronous, active-high reset clears the table.
module da_table #(
  parameter int unsigned L = lms_pkg::L_BITS,
  parameter int unsigned N = lms_pkg::N_TAPS,
  parameter int unsigned W = L + $clog2(N)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                load,
  input  logic signed [L-1:0] x_in,
  output logic signed [W-1:0] entry [2**N],
  output logic signed [L-1:0] x_tap [N]
);
  localparam int unsigned SIZE = 2 ** N;

  logic signed [W-1:0] regs [1:SIZE-1];
  logic signed [W-1:0] x_ext;

  assign x_ext = W'(x_in);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 1; k < SIZE; k++) regs[k] <= '0;
    end else if (load) begin
      for (int k = 1; k < SIZE; k++) begin
        if (k == 1)
          regs[k] <= x_ext;
        else if (k % 2 == 1)
          regs[k] <= x_ext + regs[k/2];
        else
          regs[k] <= regs[k/2];
      end
    end
  end

  // entry 0 is the '0' input of the multiplexer, not a register
  always_comb begin
    entry[0] = '0;
    for (int k = 1; k < SIZE; k++) entry[k] = regs[k];
    for (int j = 0; j < N; j++) x_tap[j] = regs[2**j][L-1:0];
  end
endmodule
