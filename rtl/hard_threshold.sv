// hard_threshold: two's complement hard threshold of one detail coefficient.
//
// The sign bit of d selects +TH or -TH as the B input of an unsigned
// comparator whose A input is d itself. Its less-than output LT, XORed with
// the sign bit, is the signed "small coefficient" decision, and an output mux
// then passes d or forces zero:
//   d >= 0: LT = (d < TH) unsigned,         zero when d < TH
//   d <  0: LT = (d < -TH) as unsigned,     zero when d >= -TH
// This is the hard-threshold rule dt = (|d| > TH) ? d : 0, with two edge cases
// that the comparator structure brings and that are kept here: d = +TH is
// passed rather than zeroed, and TH = 0 zeroes every negative d (then -TH is 0
// and no unsigned value lies below it). TH is meant to lie in
// 1 .. 2^(W-1)-1.
//
// Purely combinational. The mux/comparator/XOR structure follows the design's
// threshold circuit; the port widths are this implementation's choice.
module hard_threshold #(
  parameter int unsigned W = iwt_pkg::DEF_W
) (
  input  logic signed [W-1:0] d,
  input  logic        [W-1:0] th,
  output logic signed [W-1:0] dt
);

  logic         sign;
  logic [W-1:0] b_sel;
  logic         lt;
  logic         zero_sel;

  always_comb begin
    sign     = d[W-1];
    b_sel    = sign ? (~th + 1'b1) : th;   // -TH : +TH
    lt       = $unsigned(d) < b_sel;        // unsigned comparator
    zero_sel = lt ^ sign;
    dt       = zero_sel ? '0 : d;
  end

endmodule
