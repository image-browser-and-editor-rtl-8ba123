// Testbench for user_input with a 20-clock debounce: bounces shorter than
// the debounce time must not change the levels, a held change must appear
// after 2 synchroniser clocks plus the debounce time, and each button press
// must give exactly one `pressed` pulse while releases give none.
module tb_user_input;
  localparam int NB = 3, NS = 2, DB = 20;
  logic clk = 0, rst = 1;
  logic [NB-1:0] btn_in = 0, btn_level, btn_pressed;
  logic [NS-1:0] sw_in = 0, sw_level;
  int checks = 0, failures = 0;
  int pulses [NB];

  user_input #(.NUM_BTN(NB), .NUM_SW(NS), .DEBOUNCE_CYCLES(DB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (!rst) for (int i = 0; i < NB; i++) if (btn_pressed[i]) pulses[i]++;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < NB; i++) pulses[i] = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int b = 0; b < NB + NS; b++) begin
      int t;
      // bounce: short pulses
      for (int k = 0; k < 5; k++) begin
        if (b < NB) btn_in[b] = 1; else sw_in[b - NB] = 1;
        repeat ($urandom_range(1, DB - 3)) @(negedge clk);
        if (b < NB) btn_in[b] = 0; else sw_in[b - NB] = 0;
        repeat ($urandom_range(1, 3)) @(negedge clk);
      end
      check(btn_level == 0 && sw_level == 0, "bounce ignored");
      // hold
      if (b < NB) btn_in[b] = 1; else sw_in[b - NB] = 1;
      t = 0;
      while (((b < NB) ? btn_level[b] : sw_level[b - NB]) == 0 && t < 100) begin
        @(negedge clk); t++;
      end
      check(t >= DB && t <= DB + 3, $sformatf("input %0d settles after %0d clocks", b, t));
      repeat (30) @(negedge clk);
      if (b < NB) btn_in[b] = 0; else sw_in[b - NB] = 0;
      repeat (DB + 5) @(negedge clk);
      check(btn_level == 0 && sw_level == 0, "released");
    end
    for (int i = 0; i < NB; i++) check(pulses[i] == 1, $sformatf("button %0d one pulse (%0d)", i, pulses[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
