// User input conditioning for the labkit buttons and switches.
//
// Every input passes a two-flop synchroniser and a debouncer: the debounced
// level follows the synchronised input only after it has held a new value
// for DEBOUNCE_CYCLES consecutive clocks. For buttons a one-clock `pressed`
// pulse marks each debounced rising edge. Inputs are active high here; an
// active-low board button is inverted before this block.
//
// That buttons and switches drive the display FSM follows the design
// description; the synchroniser, the debounce scheme and its 10 ms default
// (650,000 clocks at 65 MHz) are this design's choices.
module user_input #(
  parameter int unsigned NUM_BTN         = 5,
  parameter int unsigned NUM_SW          = 1,
  parameter int unsigned DEBOUNCE_CYCLES = 650_000
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [NUM_BTN-1:0] btn_in,
  input  logic [NUM_SW-1:0]  sw_in,
  output logic [NUM_BTN-1:0] btn_level,
  output logic [NUM_BTN-1:0] btn_pressed,
  output logic [NUM_SW-1:0]  sw_level
);

  localparam int unsigned N  = NUM_BTN + NUM_SW;
  localparam int unsigned CW = $clog2(DEBOUNCE_CYCLES + 1);

  logic [N-1:0]  raw, s1, s2, level;
  logic [CW-1:0] cnt [N];

  assign raw = {sw_in, btn_in};

  always_ff @(posedge clk) begin
    if (rst) begin
      s1          <= '0;
      s2          <= '0;
      level       <= '0;
      btn_pressed <= '0;
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else begin
      s1 <= raw;
      s2 <= s1;
      btn_pressed <= '0;
      for (int i = 0; i < N; i++) begin
        if (s2[i] == level[i]) begin
          cnt[i] <= '0;
        end else if (cnt[i] == CW'(DEBOUNCE_CYCLES - 1)) begin
          cnt[i]   <= '0;
          level[i] <= s2[i];
          if (i < NUM_BTN && s2[i]) btn_pressed[i] <= 1'b1;
        end else begin
          cnt[i] <= cnt[i] + 1'b1;
        end
      end
    end
  end

  assign btn_level = level[NUM_BTN-1:0];
  assign sw_level  = level[N-1:NUM_BTN];

endmodule
