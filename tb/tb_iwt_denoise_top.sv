// tb_iwt_denoise_top: end-to-end run of the five-level denoiser at its
// default sizes (J = 5, 8-bit input, 11-bit words, thresholding on).
//
// For each of four standard test signals (Blocks, Bumps, Heavy sine,
// Doppler; 2048 samples, each scaled to a fixed variance: 317, 339, 2307 and
// 1438) and each input SNR of 5, 10, 15 and 20 dB, it adds Gaussian noise,
// rounds and clips to 8-bit samples, and picks a level threshold
// TH_j = sigma_j * sqrt(2 ln N_j), N_j = 2048 / 2^j, where sigma_j is the
// robust (median absolute value / 0.6745) estimate of the standard deviation
// of that level's detail coefficients. The noisy signal, followed by zeros to
// flush the 124-sample latency, is streamed in with occasional gaps in
// in_valid. Every output sample must match the array reference model bit for
// bit. The output SNR is measured against the clean signal and must beat the
// input SNR for the 5 and 10 dB cases. Mechanisms counted, each of which must occur:
// coefficients zeroed and passed by the threshold at every level, nonzero
// words through every detail delay line, and input gaps.
module tb_iwt_denoise_top;
  import iwt_ref_pkg::*;

  localparam int J   = 5;
  localparam int B   = 8;
  localparam int W   = 11;
  localparam int N   = 2048;
  localparam int LAT = 124;            // Table value D_0 for J = 5
  localparam int NT  = N + 128;        // a multiple of 2^J covering LAT
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [B-1:0] in_x = '0;
  logic        [W-1:0] th [J];
  logic out_valid;
  logic signed [W-1:0] out_y;

  int checks = 0, failures = 0;
  int n_zeroed [J+1], n_passed [J+1], n_dly_nonzero [J+1];
  int n_gaps = 0;

  always #5 clk = ~clk;

  iwt_denoise_top dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Donoho-Johnstone test signals at t in [0,1).
  function automatic real sgn(real v);
    return v > 0.0 ? 1.0 : (v < 0.0 ? -1.0 : 0.0);
  endfunction

  function automatic real bench(int kind, real t);
    real pos [11] = '{0.10, 0.13, 0.15, 0.23, 0.25, 0.40, 0.44, 0.65, 0.76, 0.78, 0.81};
    real hb  [11] = '{4.0, -5.0, 3.0, -4.0, 5.0, -4.2, 2.1, 4.3, -3.1, 2.1, -4.2};
    real hu  [11] = '{4.0, 5.0, 3.0, 4.0, 5.0, 4.2, 2.1, 4.3, 3.1, 5.1, 4.2};
    real wu  [11] = '{0.005, 0.005, 0.006, 0.01, 0.01, 0.03, 0.01, 0.01, 0.005, 0.008, 0.005};
    real f = 0.0;
    case (kind)
      0: for (int i = 0; i < 11; i++) f += hb[i] * (1.0 + sgn(t - pos[i])) / 2.0;
      1: for (int i = 0; i < 11; i++) f += hu[i] / ((1.0 + ((t - pos[i]) < 0 ? pos[i] - t : t - pos[i]) / wu[i]) ** 4);
      2: f = 4.0 * $sin(4.0 * PI * t) - sgn(t - 0.3) - sgn(0.72 - t);
      default: f = $sqrt(t * (1.0 - t)) * $sin(2.0 * PI * 1.05 / (t + 0.05));
    endcase
    return f;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1 << 30))) / real'(1 << 30);
    u2 = (real'($urandom_range(0, 1 << 30))) / real'(1 << 30);
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic real variance(real v [$]);
    real m = 0.0, s = 0.0;
    foreach (v[i]) m += v[i];
    m /= v.size();
    foreach (v[i]) s += (v[i] - m) ** 2;
    return s / v.size();
  endfunction

  string names [4] = '{"Blocks", "Bumps", "Heavy sine", "Doppler"};
  // Signal variance = MSE_i at 5 dB input SNR times 10^0.5.
  real tvar [4] = '{100.2239 * 3.16228, 107.1214 * 3.16228, 729.3864 * 3.16228, 454.6249 * 3.16228};

  initial begin
    foreach (n_zeroed[j]) begin n_zeroed[j] = 0; n_passed[j] = 0; n_dly_nonzero[j] = 0; end
    foreach (th[j]) th[j] = '0;
    // The package formula must reproduce the delay table of the design.
    begin
      int tab [6] = '{124, 60, 28, 12, 4, 0};
      for (int j = 0; j <= J; j++) begin
        checks++;
        if (iwt_pkg::delay_units(j, J) != tab[j]) begin
          failures++; $display("D_%0d = %0d, table gives %0d", j, iwt_pkg::delay_units(j, J), tab[j]);
        end
      end
    end

    for (int kind = 0; kind < 4; kind++) begin
      real clean [$];
      real pk, sx;
      clean = {};
      for (int k = 0; k < N; k++) clean.push_back(bench(kind, real'(k) / N));
      pk = 0.0;
      foreach (clean[k]) if ((clean[k] < 0 ? -clean[k] : clean[k]) > pk) pk = clean[k] < 0 ? -clean[k] : clean[k];
      // Scale to the signal variance the 5 dB rows of the results table imply.
      pk = $sqrt(tvar[kind] / variance(clean));
      foreach (clean[k]) clean[k] = clean[k] * pk;
      sx = variance(clean);

      for (int snr_db = 5; snr_db <= 20; snr_db += 5) begin
        iq_t xin, thq, yref, s, a, d;
        real sw, mse_i, mse_o, snr_i, snr_o;
        sw = $sqrt(sx / (10.0 ** (snr_db / 10.0)));
        xin = {};
        mse_i = 0.0;
        for (int k = 0; k < NT; k++) begin
          int v;
          if (k < N) begin
            v = $rtoi(clean[k] + sw * gauss() + (clean[k] >= 0 ? 0.5 : -0.5));
            if (v > 127) v = 127;
            if (v < -128) v = -128;
            mse_i += (v - clean[k]) ** 2;
          end else v = 0;
          xin.push_back(v);
        end
        mse_i /= N;

        // Level thresholds from the detail statistics of the noisy input.
        thq = {};
        s = xin[0:N-1];
        for (int j = 1; j <= J; j++) begin
          int mag [$];
          int t;
          real sigma;
          forward(s, W, a, d);
          mag = {};
          foreach (d[i]) mag.push_back(d[i] < 0 ? -d[i] : d[i]);
          mag.sort();
          sigma = real'(mag[mag.size() / 2]) / 0.6745;
          t = $rtoi(sigma * $sqrt(2.0 * $ln(real'(N >> j))) + 0.5);
          if (t < 1) t = 1;
          if (t > 1023) t = 1023;
          thq.push_back(t);
          s = a;
        end
        denoise(xin, J, W, thq, 1'b1, yref);

        // Mechanism counts from the model's coefficient streams.
        s = xin;
        for (int j = 1; j <= J; j++) begin
          forward(s, W, a, d);
          foreach (d[i]) begin
            if (hard_th(d[i], thq[j-1]) == 0 && d[i] != 0) n_zeroed[j]++;
            if (hard_th(d[i], thq[j-1]) != 0) n_passed[j]++;
          end
          if (j < J) foreach (d[i]) if (hard_th(d[i], thq[j-1]) != 0 && i + iwt_pkg::delay_units(j, J) < d.size()) n_dly_nonzero[j]++;
          s = a;
        end

        // Stream through the hardware.
        rst_n = 0;
        in_valid = 0;
        foreach (th[j]) th[j] = W'(thq[j]);
        repeat (3) @(posedge clk);
        @(negedge clk) rst_n = 1;
        mse_o = 0.0;
        for (int k = 0; k < NT; k++) begin
          @(negedge clk);
          while (snr_db != 10 && $urandom_range(0, 15) == 0) begin
            in_valid = 0;
            n_gaps++;
            @(negedge clk);
          end
          in_valid = 1;
          in_x = B'(xin[k]);
          #1;
          checks++;
          if (!out_valid || int'(out_y) != yref[k]) begin
            failures++;
            if (failures < 20) $display("%s %0d dB sample %0d: out=%0d expected %0d", names[kind], snr_db, k, out_y, yref[k]);
          end
          if (k >= LAT && k - LAT < N) mse_o += (real'(out_y) - clean[k - LAT]) ** 2;
        end
        @(negedge clk) in_valid = 0;
        mse_o /= N;
        snr_i = 10.0 * $log10(sx / mse_i);
        snr_o = 10.0 * $log10(sx / mse_o);
        $display("%-10s SNR_i %5.2f dB  MSE_i %8.3f  SNR_o %5.2f dB  MSE_o %8.3f  TH = %0d %0d %0d %0d %0d",
                 names[kind], snr_i, mse_i, snr_o, mse_o, thq[0], thq[1], thq[2], thq[3], thq[4]);
        if (snr_db <= 10) begin
          checks++;
          if (snr_o <= snr_i) begin failures++; $display("no SNR gain"); end
        end
      end
    end

    for (int j = 1; j <= J; j++) begin
      $display("level %0d: zeroed %0d passed %0d, nonzero through delay %0d", j, n_zeroed[j], n_passed[j], n_dly_nonzero[j]);
      checks++;
      if (n_zeroed[j] == 0 || n_passed[j] == 0) begin failures++; $display("level %0d threshold not exercised", j); end
      if (j < J) begin
        checks++;
        if (n_dly_nonzero[j] == 0) begin failures++; $display("level %0d delay line not exercised", j); end
      end
    end
    $display("input gaps %0d", n_gaps);
    checks++;
    if (n_gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
