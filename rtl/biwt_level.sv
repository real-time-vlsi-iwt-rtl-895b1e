// biwt_level: one level of the backward real-time (5/3) integer wavelet
// transform by lifting, with the merge stage that interleaves the
// reconstructed even and odd samples.
//
// At every coefficient pair (pair_valid) it takes an approximation a[n-1] and
// a detail d[n] and computes
//   x_se[n-1] = a[n-1] - floor((d[n-1] + d[n]) / 4)             (undo update)
//   x_so[n-2] = d[n-1] + floor((x_se[n-1] + x_se[n-2]) / 2)     (undo predict)
// with arithmetic shifts for the floors. d[n-1] and x_se[n-2] come from the
// level's two unit delays. The merge stage sends x_se[n-2] out in the pair's
// cycle and holds x_so[n-2] for the next output slot.
//
// Interface: pair_valid marks a coefficient pair (the level's own sample
// clock); slot_valid marks the sample slots of the output stream, which runs
// at twice that rate, and every pair_valid cycle is also a slot. In the
// top these are the output and input strobes of the matching forward level.
// out_x is driven from registers only and is valid whenever slot_valid is
// high. A forward level followed directly by this level reproduces its input
// four samples late. Sums are one bit wider than W; results keep W bits.
// All registers reset to zero.
//
// The equations and the unit delays follow the lifting schematic of the
// design; the strobes, the output timing of the merge and the reset are this
// implementation's own.
module biwt_level #(
  parameter int unsigned W = iwt_pkg::DEF_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pair_valid,
  input  logic                slot_valid,
  input  logic signed [W-1:0] in_a,
  input  logic signed [W-1:0] in_d,
  output logic signed [W-1:0] out_x
);

  logic signed [W-1:0] d_q;      // d[n-1]
  logic signed [W-1:0] xse_q;    // x_se[n-2]
  logic signed [W-1:0] odd_q;    // x_so held for the next output slot

  logic signed [W:0]   d_sum, xse_sum;
  logic signed [W-1:0] xse_now, xso_now;

  always_comb begin
    d_sum   = (W+1)'(d_q) + (W+1)'(in_d);
    xse_now = in_a - W'(d_sum >>> 2);
    xse_sum = (W+1)'(xse_now) + (W+1)'(xse_q);
    xso_now = d_q + W'(xse_sum >>> 1);
  end

  assign out_x = pair_valid ? xse_q : odd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q   <= '0;
      xse_q <= '0;
      odd_q <= '0;
    end else if (pair_valid) begin
      d_q   <= in_d;
      xse_q <= xse_now;
      odd_q <= xso_now;
    end
  end

  // A pair always falls on a slot of the output stream.
  a_pair_on_slot: assert property (@(posedge clk) disable iff (!rst_n)
                                   pair_valid |-> slot_valid)
    else $error("biwt_level: pair_valid outside an output slot");

endmodule
