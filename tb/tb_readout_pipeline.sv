// tb_readout_pipeline: random 128-bit columns enter the 135-column pipeline
// (default size); after the pipeline has filled, every output column must be
// the one that entered exactly 135 cycles earlier.
module tb_readout_pipeline;
  logic         clk = 1'b0;
  logic [127:0] din, dout;
  logic [127:0] hist [$];
  int checks = 0, failures = 0;

  readout_pipeline dut (.clk, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if (hist.size() == 135) begin
        checks++;
        if (dout !== hist[0]) begin
          failures++;
          if (failures < 5) $display("FAIL cycle %0d: got %h expected %h", n, dout, hist[0]);
        end
        void'(hist.pop_front());
      end
      din = {$urandom, $urandom, $urandom, $urandom};
      hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
