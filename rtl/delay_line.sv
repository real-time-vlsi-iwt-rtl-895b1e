// delay_line: fixed delay of a detail coefficient stream by DEPTH samples of
// its own level.
//
// A DEPTH-stage shift register of W-bit words that advances only when en is
// high, i.e. at the sample rate of the level it serves. dout is the word that
// went in DEPTH enabled cycles earlier (zero after reset), read from the last
// stage. In the J-level denoiser level j uses DEPTH = 4(2^(J-j) - 1), which
// lines its detail up with the reconstructed approximation coming back from
// the deeper levels (60, 28, 12 and 4 for J = 5).
//
// The delay lengths are the design's; building them from flip-flops, the
// enable and the reset are this implementation's choices. DEPTH must be at
// least 1; a level that needs no delay is wired directly.
module delay_line #(
  parameter int unsigned W     = iwt_pkg::DEF_W,
  parameter int unsigned DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);

  logic signed [W-1:0] sr [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
    end else if (en) begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  assign dout = sr[DEPTH-1];

  initial begin
    if (DEPTH < 1) $fatal(1, "delay_line: DEPTH must be at least 1");
  end

endmodule
