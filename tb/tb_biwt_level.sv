// tb_biwt_level: checks one backward lifting level by perfect
// reconstruction. The testbench computes forward coefficients of a random
// signal with its array model, feeds them in as pairs (one pair every second
// output slot, slots arriving with random gaps), and requires the output
// stream to equal the original signal exactly four samples late.
module tb_biwt_level;
  import iwt_ref_pkg::*;

  localparam int W = 11;
  localparam int N = 600;
  localparam int LAT = 4;

  logic clk = 0, rst_n = 0, pair_valid = 0, slot_valid = 0;
  logic signed [W-1:0] in_a = '0, in_d = '0;
  logic signed [W-1:0] out_x;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  biwt_level #(.W(W)) dut (.*);

  iq_t xs, ra, rd;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) xs.push_back(int'($urandom_range(0, 510)) - 255);
    forward(xs, W, ra, rd);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin
        slot_valid = 0; pair_valid = 0;
        @(negedge clk);
      end
      slot_valid = 1;
      pair_valid = (k % 2 == 0);
      if (k % 2 == 0) begin
        in_a = W'(ra[k/2]);
        in_d = W'(rd[k/2]);
      end
      #1;
      checks++;
      if (int'(out_x) != (k >= LAT ? xs[k-LAT] : 0)) begin
        failures++;
        $display("slot %0d: out=%0d expected %0d", k, out_x, (k >= LAT ? xs[k-LAT] : 0));
      end
    end
    @(negedge clk) begin slot_valid = 0; pair_valid = 0; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
