// Testbench for usb_reader: sends random bytes with the strobe handshake,
// changing the pins away from the clock edge as an asynchronous sender
// would, and checks every byte arrives once, in order, within four clocks
// of the strobe's rising edge.
module tb_usb_reader;
  logic clk = 0, rst = 1;
  logic [7:0] usb_data = 0, byte_data;
  logic usb_strobe = 0, byte_valid;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];
  int rise_cycle, cycle = 0;

  usb_reader dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && byte_valid) begin
    checks++;
    if (sent.size() == 0) begin
      failures++; $display("unexpected byte %h", byte_data);
    end else begin
      logic [7:0] exp;
      exp = sent.pop_front();
      if (byte_data !== exp) begin failures++; $display("got %h exp %h", byte_data, exp); end
    end
    checks++;
    if (cycle - rise_cycle > 4) begin failures++; $display("latency %0d", cycle - rise_cycle); end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      int hi, lo;
      hi = 3 + $urandom_range(0, 3);
      lo = 3 + $urandom_range(0, 3);
      #2 usb_data = 8'($urandom);
      sent.push_back(usb_data);
      @(posedge clk); #3 usb_strobe = 1; rise_cycle = cycle;
      repeat (hi) @(posedge clk);
      #3 usb_strobe = 0;
      repeat (lo) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("%0d bytes lost", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
