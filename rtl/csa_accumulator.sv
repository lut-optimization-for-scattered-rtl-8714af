// csa_accumulator: signed carry-save shift accumulator, one row of W full
// adders (W = L+2) and a sum and a carry register per position.
// Each bit cycle it adds a partial inner product p_in to the running sum
// shifted right by one place, without carry propagation:
//   full adder i takes  a = p_in[i] XOR sign_ctrl,
//                       b = S[i+1] (S[W-1] at the top: sign extension),
//                       c = C[i]   (its own carry of the previous cycle)
//   and writes its sum to S[i] and its carry to C[i].
// The carry register C[i] has weight 2^(i+1), so the value held is
// acc = S + 2*C (S and C read as W-bit two's complement numbers), and every
// cycle computes acc' = floor(acc/2) + p exactly. sign_ctrl is 1 for the MSB
// slice: the XOR gates then add the one's complement of p_in, and the final
// adder downstream adds the missing 1.
// `first` starts a new accumulation (the shifted feedback is taken as 0).
// s_nxt/c_nxt are the full-adder outputs of this cycle, so the caller can
// capture the finished words at the end of the last bit cycle.
// Registers update when en is high; synchronous, active-high reset.
module csa_accumulator #(
  parameter int unsigned W = lms_pkg::L_BITS + lms_pkg::GUARD
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         first,
  input  logic         sign_ctrl,
  input  logic [W-1:0] p_in,
  output logic [W-1:0] s_nxt,
  output logic [W-1:0] c_nxt
);
  logic [W-1:0] s_q, c_q;
  logic [W-1:0] a, b, c;

  always_comb begin
    a = p_in ^ {W{sign_ctrl}};
    b = first ? '0 : {s_q[W-1], s_q[W-1:1]};
    c = first ? '0 : c_q;
    s_nxt = a ^ b ^ c;
    c_nxt = (a & b) | (a & c) | (b & c);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s_q <= '0;
      c_q <= '0;
    end else if (en) begin
      s_q <= s_nxt;
      c_q <= c_nxt;
    end
  end
endmodule
