// bit_timer: bit-cycle counter of the bit-serial DA filter.
// The carry-save accumulator works on a fast bit clock and every other part of
// the filter on a sample clock L times slower. Here both run from one clock,
// clk, which is the bit clock: this counter counts the L bit cycles of each
// sample period and raises `tick` in the last of them. Registers of the
// sample-rate part load only when `tick` is high, so they behave as if clocked
// by the slow clock, without a second clock domain (a design choice).
//   bit_idx : index l of the weight bit slice for the current bit cycle
//             (0 = LSB first, L-1 = MSB last)
//   first   : bit cycle 0, the accumulator starts a new inner product
//   last    : bit cycle L-1, the MSB slice; this is the sign control of the
//             carry-save accumulator
//   tick    : last && en; sample-clock edge at the end of the cycle
// While en is low the counter holds. Synchronous, active-high reset to bit 0.
// An assertion checks that the count stays below L.
module bit_timer #(
  parameter int unsigned L = lms_pkg::L_BITS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  output logic [$clog2(L)-1:0] bit_idx,
  output logic                 first,
  output logic                 last,
  output logic                 tick
);
  localparam logic [$clog2(L)-1:0] LAST_IDX = $clog2(L)'(L - 1);

  always_ff @(posedge clk) begin
    if (rst)
      bit_idx <= '0;
    else if (en)
      bit_idx <= (bit_idx == LAST_IDX) ? '0 : bit_idx + 1'b1;
  end

  // the counter never leaves 0..L-1
  a_idx_range: assert property (@(posedge clk) disable iff (rst) bit_idx <= LAST_IDX);

  always_comb begin
    first = (bit_idx == '0);
    last  = (bit_idx == LAST_IDX);
    tick  = last && en;
  end
endmodule
