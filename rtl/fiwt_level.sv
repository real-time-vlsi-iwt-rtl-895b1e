// fiwt_level: one level of the forward real-time (5/3) integer wavelet
// transform by lifting.
//
// The incoming stream alternates even and odd samples, starting with an even
// one. An odd sample is only stored. When the next even sample x_ae[n] arrives
// it completes a pair with the stored odd sample x_ao[n-1], and in the same
// cycle the level produces
//   d[n]   = x_ao[n-1] - floor((x_ae[n] + x_ae[n-1]) / 2)    (predict)
//   a[n-1] = x_ae[n-1] + floor((d[n-1] + d[n]) / 4)         (update)
// The two floor divisions are arithmetic right shifts by 1 and 2 bits, so the
// level uses adders and shifts only. Besides the odd-sample holding register
// (the split stage) it has the two unit delays of the lifting schematic: the
// previous even sample and the previous detail.
//
// Interface: in_valid marks a sample of the input stream (the level's own
// sample clock); out_valid, out_a and out_d are combinational and are valid in
// the cycle of every second input sample, so the output streams run at half
// the input rate. Sums are formed one bit wider than W so the halves and
// quarters are exact; results are kept to W bits (two's complement wrap).
// All registers reset to zero, which is the state of a zero-valued history.
//
// The equations, the shift-based floor and the register placement follow the
// lifting schematic of the design. The valid strobe, the reset to zero and
// the choice that the first sample after reset is even are this
// implementation's own.
module fiwt_level #(
  parameter int unsigned W = iwt_pkg::DEF_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_x,
  output logic                out_valid,
  output logic signed [W-1:0] out_a,
  output logic signed [W-1:0] out_d
);

  logic                even_phase;  // next input sample is even
  logic signed [W-1:0] odd_q;       // x_ao[n-1]
  logic signed [W-1:0] even_q;      // x_ae[n-1]
  logic signed [W-1:0] d_q;         // d[n-1]

  logic signed [W:0]   even_sum, d_sum;
  logic signed [W-1:0] d_now;

  always_comb begin
    even_sum = (W+1)'(in_x) + (W+1)'(even_q);
    d_now    = odd_q - W'(even_sum >>> 1);
    d_sum    = (W+1)'(d_q) + (W+1)'(d_now);
    out_d    = d_now;
    out_a    = even_q + W'(d_sum >>> 2);
  end

  assign out_valid = in_valid && even_phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      even_phase <= 1'b1;
      odd_q      <= '0;
      even_q     <= '0;
      d_q        <= '0;
    end else if (in_valid) begin
      even_phase <= !even_phase;
      if (even_phase) begin
        even_q <= in_x;
        d_q    <= d_now;
      end else begin
        odd_q  <= in_x;
      end
    end
  end

endmodule
