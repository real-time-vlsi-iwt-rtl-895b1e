// iwt_denoise_top: real-time wavelet denoiser built from J tandem levels of
// the (5/3) integer lifting transform with hard thresholding of the details.
//
// Level j's forward unit splits the approximation stream of level j-1 into
// an approximation a_j and a detail d_j, each at half that rate; a_j feeds
// level j+1. Every detail d_j passes a hard threshold (threshold th[j-1]) and
// then a delay line of D_j = 4(2^(J-j) - 1) level-j samples, so that it meets
// the approximation ar_j rebuilt by the deeper levels in the same pairing the
// forward unit produced it in. At level J the forward outputs go straight to
// the backward unit. Each backward unit merges its result into the stream of
// the level above; level 1's backward output is the denoised signal.
//
// Timing: in_valid marks an input sample (the sampling clock Fs); it may be
// high every cycle or with gaps. Each level's sample strobe is derived from
// the one above, so level j runs at Fs/2^j, and no memory beyond the
// registers and delay lines is used. out_valid equals in_valid, and out_y is
// the reconstruction of the input from D_0 = 4(2^J - 1) samples earlier
// (124 samples for J = 5). With USE_THRESHOLD = 0 the output is the input
// delayed exactly by that amount (sign-extended to W bits). The input is
// sign-extended from B to W = B + 3 bits; out_y keeps all W bits. A pair of
// coefficients ripples through the forward and backward units of all levels
// within one clock cycle, as in the direct-mapped lifting schematic, so the
// clock period grows with J.
//
// The level structure, the delay formula, the word length and the threshold
// circuit follow the design. The strobe-based timing, the threshold bypass
// parameter, the reset to zero and the full-width output are this
// implementation's own choices.
module iwt_denoise_top
  import iwt_pkg::*;
#(
  parameter int unsigned J             = DEF_J,
  parameter int unsigned B             = DEF_B,
  parameter int unsigned W             = DEF_W,
  parameter bit          USE_THRESHOLD = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [B-1:0] in_x,
  input  logic        [W-1:0] th [J],   // th[j-1]: threshold of level j
  output logic                out_valid,
  output logic signed [W-1:0] out_y
);

  for (genvar j = 1; j <= J; j++) begin : lvl
    localparam int unsigned DJ = delay_units(j, J);

    logic                s_valid;   // sample strobe of the level j-1 stream
    logic signed [W-1:0] s_x;       // level j-1 approximation (input stream)
    logic                c_valid;   // sample strobe of level j
    logic signed [W-1:0] a, d;      // forward outputs
    logic signed [W-1:0] dt;        // thresholded detail
    logic signed [W-1:0] dd;        // aligned detail
    logic signed [W-1:0] ar;        // approximation into the backward unit
    logic signed [W-1:0] rec;       // reconstructed level j-1 stream

    if (j == 1) begin : g_in
      assign s_valid = in_valid;
      assign s_x     = W'(in_x);
    end else begin : g_in
      assign s_valid = lvl[j-1].c_valid;
      assign s_x     = lvl[j-1].a;
    end

    fiwt_level #(.W(W)) u_fwd (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (s_valid),
      .in_x     (s_x),
      .out_valid(c_valid),
      .out_a    (a),
      .out_d    (d)
    );

    if (USE_THRESHOLD) begin : g_th
      hard_threshold #(.W(W)) u_th (
        .d (d),
        .th(th[j-1]),
        .dt(dt)
      );
    end else begin : g_th
      assign dt = d;
    end

    if (DJ > 0) begin : g_dly
      delay_line #(.W(W), .DEPTH(DJ)) u_dly (
        .clk  (clk),
        .rst_n(rst_n),
        .en   (c_valid),
        .din  (dt),
        .dout (dd)
      );
    end else begin : g_dly
      assign dd = dt;
    end

    if (j == J) begin : g_ar
      assign ar = a;
    end else begin : g_ar
      assign ar = lvl[j+1].rec;
    end

    biwt_level #(.W(W)) u_bwd (
      .clk       (clk),
      .rst_n     (rst_n),
      .pair_valid(c_valid),
      .slot_valid(s_valid),
      .in_a      (ar),
      .in_d      (dd),
      .out_x     (rec)
    );
  end

  assign out_valid = in_valid;
  assign out_y     = lvl[1].rec;

endmodule
