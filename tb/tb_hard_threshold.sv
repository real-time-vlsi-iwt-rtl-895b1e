// tb_hard_threshold: exhaustive check of the hard threshold for every W-bit
// coefficient and a set of thresholds. The expected value is the rule
// dt = (|d| > TH) ? d : 0, adjusted for the two edge cases of the
// comparator circuit: d = +TH passes, and TH = 0 zeroes negative values.
module tb_hard_threshold;
  localparam int W = 11;

  logic signed [W-1:0] d;
  logic        [W-1:0] th;
  logic signed [W-1:0] dt;
  int checks = 0, failures = 0;
  int ths[$] = '{0, 1, 2, 7, 30, 100, 511, 1000, 1023};

  hard_threshold #(.W(W)) dut (.*);

  function automatic int expected(int dv, int t);
    int mag = dv < 0 ? -dv : dv;
    if (t == 0) return dv < 0 ? 0 : dv;
    if (dv == t) return dv;
    return (mag > t) ? dv : 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 6; t++) ths.push_back($urandom_range(1, 1023));
    foreach (ths[i]) begin
      for (int v = -(1 << (W-1)); v < (1 << (W-1)); v++) begin
        d = W'(v);
        th = W'(ths[i]);
        #1;
        checks++;
        if (int'(dt) != expected(v, ths[i])) begin
          failures++;
          if (failures < 10) $display("d=%0d th=%0d: dt=%0d expected %0d", v, ths[i], dt, expected(v, ths[i]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
