// tb_fiwt_level: checks one forward lifting level against the array model.
// Random samples, arriving with random gaps, are fed in; at every second
// sample the level must flag out_valid and present the model's a and d.
// It also checks that no output appears on the odd samples.
module tb_fiwt_level;
  import iwt_ref_pkg::*;

  localparam int W = 11;
  localparam int N = 600;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] in_x = '0;
  logic out_valid;
  logic signed [W-1:0] out_a, out_d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fiwt_level #(.W(W)) dut (.*);

  iq_t xs, ra, rd;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++)
      xs.push_back(i < 40 ? ((i % 7) * 60 - 200) : (int'($urandom_range(0, 510)) - 255));
    forward(xs, W, ra, rd);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin
        in_valid = 0;
        #1;
        checks++;
        if (out_valid) begin failures++; $display("out_valid without input"); end
        @(negedge clk);
      end
      in_valid = 1;
      in_x = W'(xs[k]);
      #1;
      checks++;
      if (out_valid !== (k % 2 == 0)) begin
        failures++; $display("sample %0d: out_valid=%0b", k, out_valid);
      end
      if (k % 2 == 0) begin
        checks++;
        if (int'(out_d) != rd[k/2] || int'(out_a) != ra[k/2]) begin
          failures++;
          $display("pair %0d: a=%0d d=%0d, expected a=%0d d=%0d", k/2, out_a, out_d, ra[k/2], rd[k/2]);
        end
      end
    end
    @(negedge clk) in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
