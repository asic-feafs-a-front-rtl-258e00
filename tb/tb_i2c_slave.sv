// tb_i2c_slave: an I2C master (about 1 MHz SCL against a 100 MHz system
// clock) talks to the slave, which is connected to a 256-byte register model.
// Checked: acknowledge of its own address, no acknowledge and no write for
// another address, multi-byte writes with pointer auto-increment, reads with a
// repeated start, and the master's NACK ending a read.
module tb_i2c_slave;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       scl = 1'b1, m_low = 1'b0;
  logic       sda, sda_oe;
  logic [7:0] reg_addr, reg_wdata, reg_rdata;
  logic       reg_wr;
  logic [7:0] regs [256];
  int checks = 0, failures = 0, writes = 0;

  assign sda = ~(m_low | sda_oe);

  i2c_slave #(.DEV_ADDR(7'h40)) dut (.clk, .rst_n, .scl, .sda_i(sda), .sda_oe,
    .reg_addr, .reg_wr, .reg_wdata, .reg_rdata);

  assign reg_rdata = regs[reg_addr];
  always @(posedge clk) if (reg_wr) begin regs[reg_addr] <= reg_wdata; writes++; end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int Q = 25;  // quarter SCL period in system clocks

  task automatic wait_q(); repeat (Q) @(posedge clk); endtask

  task automatic i2c_start();
    m_low = 1'b0; wait_q(); scl = 1'b1; wait_q();
    m_low = 1'b1; wait_q(); scl = 1'b0; wait_q();
  endtask

  task automatic i2c_stop();
    m_low = 1'b1; wait_q(); scl = 1'b1; wait_q(); m_low = 1'b0; wait_q(); wait_q();
  endtask

  task automatic write_byte(input logic [7:0] b, output bit ack);
    for (int i = 7; i >= 0; i--) begin
      m_low = ~b[i]; wait_q(); scl = 1'b1; wait_q(); wait_q(); scl = 1'b0; wait_q();
    end
    m_low = 1'b0; wait_q(); scl = 1'b1; wait_q(); ack = ~sda; wait_q(); scl = 1'b0; wait_q();
  endtask

  task automatic read_byte(input bit ack, output logic [7:0] b);
    m_low = 1'b0;
    for (int i = 7; i >= 0; i--) begin
      wait_q(); scl = 1'b1; wait_q(); b[i] = sda; wait_q(); scl = 1'b0; wait_q();
    end
    m_low = ack; wait_q(); scl = 1'b1; wait_q(); wait_q(); scl = 1'b0; wait_q();
    m_low = 1'b0;
  endtask

  task automatic expect_ack(input bit got, input bit exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: ack=%0d expected %0d", what, got, exp); end
  endtask

  initial begin
    bit ack;
    logic [7:0] b;
    for (int i = 0; i < 256; i++) regs[i] = 8'(i * 7 + 3);
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    // write 3 bytes from 0x10
    i2c_start();
    write_byte({7'h40, 1'b0}, ack); expect_ack(ack, 1, "address W");
    write_byte(8'h10, ack);         expect_ack(ack, 1, "pointer");
    write_byte(8'hA5, ack);         expect_ack(ack, 1, "data 0");
    write_byte(8'h3C, ack);         expect_ack(ack, 1, "data 1");
    write_byte(8'hF0, ack);         expect_ack(ack, 1, "data 2");
    i2c_stop();
    checks += 4;
    if (regs[8'h10] !== 8'hA5) begin failures++; $display("FAIL reg 0x10 = %h", regs[8'h10]); end
    if (regs[8'h11] !== 8'h3C) begin failures++; $display("FAIL reg 0x11 = %h", regs[8'h11]); end
    if (regs[8'h12] !== 8'hF0) begin failures++; $display("FAIL reg 0x12 = %h", regs[8'h12]); end
    if (writes != 3)           begin failures++; $display("FAIL %0d writes", writes); end
    // another device address: no ack, no write
    i2c_start();
    write_byte({7'h41, 1'b0}, ack); expect_ack(ack, 0, "foreign address");
    write_byte(8'h20, ack);         expect_ack(ack, 0, "foreign pointer");
    i2c_stop();
    checks++;
    if (writes != 3) begin failures++; $display("FAIL write to a foreign address"); end
    // read back with repeated start, 4 bytes from 0x0F
    i2c_start();
    write_byte({7'h40, 1'b0}, ack); expect_ack(ack, 1, "address W");
    write_byte(8'h0F, ack);         expect_ack(ack, 1, "pointer");
    i2c_start();
    write_byte({7'h40, 1'b1}, ack); expect_ack(ack, 1, "address R");
    for (int i = 0; i < 4; i++) begin
      read_byte(i != 3, b);
      checks++;
      if (b !== regs[8'h0F + i]) begin
        failures++; $display("FAIL read %0d: %h expected %h", i, b, regs[8'h0F + i]);
      end
    end
    i2c_stop();
    // the bus must be released after the NACK
    checks++;
    if (sda_oe) begin failures++; $display("FAIL SDA held after read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
