// tb_async_fifo: the 16-word dual-clock FIFO, written at 40 MHz and read at
// 100 MHz (and, in a second phase, read slower than written).
// Phase 1 fills it without reading: exactly 16 words are accepted, full rises
// and extra writes are ignored; rd_full must follow on the read side. Then it
// is drained and must deliver the words in order and end empty. Phase 2 runs
// random traffic on both sides against a reference queue.
module tb_async_fifo;
  logic         arst_n = 1'b0;
  logic         wclk = 1'b0, rclk = 1'b0;
  logic         write = 1'b0, read = 1'b0;
  logic [127:0] write_data = '0, read_data;
  logic         full, empty, rd_full;
  logic [127:0] model [$];
  int checks = 0, failures = 0;
  int accepted = 0, popped = 0, full_seen = 0, rd_full_seen = 0;
  bit rd_slow = 0, rd_enable = 0, wr_enable = 0, wr_force = 0;

  async_fifo dut (.arst_n, .wclk, .write, .write_data, .full, .rclk, .read,
                  .read_data, .empty, .rd_full);

  always #12.5 wclk = ~wclk;
  always #5    rclk = ~rclk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write side
  always @(negedge wclk) begin
    write <= 1'b0;
    if (wr_enable && (wr_force || (!full && $urandom_range(3) != 0))) begin
      write      <= 1'b1;
      write_data <= {$urandom, $urandom, $urandom, $urandom};
    end
  end
  always @(posedge wclk) begin
    if (full) full_seen++;
    if (write && !full) begin
      model.push_back(write_data);
      accepted++;
    end
  end

  // read side
  always @(negedge rclk) begin
    read <= 1'b0;
    if (rd_full) rd_full_seen++;
    if (rd_enable && !empty && (!rd_slow || $urandom_range(4) == 0)) begin
      checks++;
      if (model.size() == 0 || read_data !== model[0]) begin
        failures++;
        $display("FAIL word %0d: got %h", popped, read_data);
      end
      if (model.size() != 0) void'(model.pop_front());
      popped++;
      read <= 1'b1;
    end
  end

  initial begin
    #100 arst_n = 1'b1;
    repeat (5) @(posedge wclk);
    checks++;
    if (!empty || full) begin failures++; $display("FAIL flags after reset"); end
    // Phase 1: overfill
    wr_force = 1; wr_enable = 1;
    repeat (24) @(posedge wclk);
    wr_enable = 0; wr_force = 0;
    repeat (6) @(posedge rclk);
    checks += 3;
    if (accepted != 16) begin failures++; $display("FAIL accepted %0d words", accepted); end
    if (!full)    begin failures++; $display("FAIL full not set"); end
    if (!rd_full) begin failures++; $display("FAIL rd_full not set"); end
    rd_enable = 1;
    repeat (60) @(posedge rclk);
    checks += 2;
    if (popped != 16) begin failures++; $display("FAIL popped %0d words", popped); end
    if (!empty) begin failures++; $display("FAIL not empty after drain"); end
    // Phase 2: random traffic, fast then slow reader
    wr_enable = 1;
    repeat (2000) @(posedge wclk);
    rd_slow = 1;
    repeat (2000) @(posedge wclk);
    wr_enable = 0; rd_slow = 0;
    repeat (200) @(posedge rclk);
    checks += 2;
    if (popped != accepted) begin failures++; $display("FAIL %0d written, %0d read", accepted, popped); end
    if (full_seen < 20) begin failures++; $display("FAIL full rarely reached in phase 2"); end
    $display("written=%0d read=%0d full_cycles=%0d rd_full_cycles=%0d", accepted, popped, full_seen, rd_full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
