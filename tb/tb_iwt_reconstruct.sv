// tb_iwt_reconstruct: perfect-reconstruction and latency test of the tandem
// with the threshold bypassed. For J = 1, 3 and 5 levels random 8-bit
// samples, with random gaps in in_valid, must come out unchanged exactly
// 4(2^J - 1) samples later: 4, 28 and 124 samples. This checks the detail
// delay alignment of every level against a model-free expectation.
module tb_iwt_reconstruct;
  localparam int B = 8;
  localparam int W = 11;
  localparam int NS = 3000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [B-1:0] in_x = '0;
  logic [W-1:0] th1 [1], th3 [3], th5 [5];
  logic ov1, ov3, ov5;
  logic signed [W-1:0] y1, y3, y5;
  int checks = 0, failures = 0;
  int hist[$];

  always #5 clk = ~clk;

  iwt_denoise_top #(.J(1), .USE_THRESHOLD(1'b0)) dut1 (.clk, .rst_n, .in_valid, .in_x, .th(th1), .out_valid(ov1), .out_y(y1));
  iwt_denoise_top #(.J(3), .USE_THRESHOLD(1'b0)) dut3 (.clk, .rst_n, .in_valid, .in_x, .th(th3), .out_valid(ov3), .out_y(y3));
  iwt_denoise_top #(.J(5), .USE_THRESHOLD(1'b0)) dut5 (.clk, .rst_n, .in_valid, .in_x, .th(th5), .out_valid(ov5), .out_y(y5));

  function automatic int past(int n);
    return (hist.size() > n) ? hist[hist.size() - 1 - n] : 0;
  endfunction

  task automatic check(string tag, logic ov, logic signed [W-1:0] y, int lat);
    checks++;
    if (!ov || int'(y) != past(lat)) begin
      failures++;
      if (failures < 20) $display("%s sample %0d: out=%0d expected %0d", tag, hist.size() - 1, y, past(lat));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    th1 = '{default: '0}; th3 = '{default: '0}; th5 = '{default: '0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < NS; k++) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_x = B'($urandom_range(0, 255));
      hist.push_back(int'(in_x));
      #1;
      check("J=1", ov1, y1, 4);
      check("J=3", ov3, y3, 28);
      check("J=5", ov5, y5, 124);
    end
    @(negedge clk) in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
