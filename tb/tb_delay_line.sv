// tb_delay_line: feeds random words with a random enable into a 4-stage and
// a 60-stage delay line and checks that each output is the word written the
// stated number of enabled cycles before (zero before that), and that the
// output holds while the enable is low.
module tb_delay_line;
  localparam int W = 11;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] din = '0;
  logic signed [W-1:0] dout4, dout60;
  int checks = 0, failures = 0;
  int hist[$];

  always #5 clk = ~clk;

  delay_line #(.W(W))              dut4  (.clk, .rst_n, .en, .din, .dout(dout4));
  delay_line #(.W(W), .DEPTH(60))  dut60 (.clk, .rst_n, .en, .din, .dout(dout60));

  function automatic int past(int n);
    return (hist.size() >= n) ? hist[hist.size() - n] : 0;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      checks++;
      if (int'(dout4) != past(4) || int'(dout60) != past(60)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: dout4=%0d (%0d) dout60=%0d (%0d)", k, dout4, past(4), dout60, past(60));
      end
      en  = $urandom_range(0, 2) != 0;
      din = W'(int'($urandom_range(0, 2047)) - 1024);
      if (en) hist.push_back(int'(din));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
