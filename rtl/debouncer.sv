// debouncer: push-button contact debouncer.
//
// The board's push buttons are active low and bounce for a few
// milliseconds when pressed or released. The raw input is first brought
// into the clock domain by a two-flop synchronizer. A counter then measures
// how long the synchronized input has differed from the accepted state;
// only when it has differed for DEBOUNCE_CYCLES consecutive clocks is the
// new state accepted, and any bounce back restarts the count.
//
// Interface: `btn_n` is the raw button (0 = pressed). `pressed` is the
// clean level (1 = pressed) and `press` a one-clock pulse on the clock the
// press is accepted.
// Timing: a clean press shows on `pressed` and `press` 2 + DEBOUNCE_CYCLES
// clocks after it reaches `btn_n`. The document only says that this unit
// protects the buttons from contact jitter; the counter scheme and the
// default of 10 ms at the board's 50 MHz clock are this design's choice.
module debouncer #(
  parameter int unsigned DEBOUNCE_CYCLES = 500_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic btn_n,    // raw button, active low, asynchronous
  output logic pressed,  // debounced level, active high
  output logic press     // one-clock pulse when a press is accepted
);

  localparam int unsigned CNT_W = $clog2(DEBOUNCE_CYCLES + 1);

  logic [1:0]       sync_n;
  logic             raw;     // synchronized, active high
  logic [CNT_W-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_n <= 2'b11;
    else        sync_n <= {sync_n[0], btn_n};
  end

  assign raw = ~sync_n[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      pressed <= 1'b0;
      press   <= 1'b0;
    end else begin
      press <= 1'b0;
      if (raw == pressed) begin
        count <= '0;
      end else if (count == CNT_W'(DEBOUNCE_CYCLES - 1)) begin
        count   <= '0;
        pressed <= raw;
        press   <= raw;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
