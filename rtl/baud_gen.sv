// baud_gen: selectable baud rate generator.
//
// The generator does not make clocks. It produces a one-cycle enable pulse,
// tick, at 16 times the selected bit rate, and the transmitter and receiver
// run on the system clock qualified by that pulse. A prescaler divides the
// clock by BASE_DIV; behind it sits a chain of STAGES divide-by-two stages
// (a binary counter whose bit k toggles at half the rate of bit k-1). Tap 0
// is the prescaler output, tap k fires once every 2^k prescaler pulses, and
// a multiplexer driven by sel picks one tap. The chain of delay stages and
// the output multiplexer follow the document's baud rate generator; building
// them as one synchronous counter with enable taps, and the values of
// BASE_DIV and STAGES, are this design's choices.
//
// Rate: tick fires every BASE_DIV * 2^sel clock cycles, so with the 25 MHz
// clock and BASE_DIV = 1 the bit rate is 25 MHz / (16 * 2^sel): 1.5625 Mbit/s
// for sel = 0 down to 12.2 kbit/s for sel = 7. tick is registered, so it
// comes one cycle after the counter state that causes it. A sel value of
// STAGES or more selects the slowest tap.
module baud_gen #(
  parameter int unsigned BASE_DIV = 1,  // prescaler ratio, >= 1
  parameter int unsigned STAGES   = 8   // number of selectable rates, >= 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(STAGES)-1:0] sel,   // rate select: 0 = fastest
  output logic                      tick   // 1-cycle enable at 16x bit rate
);

  localparam int unsigned PW = (BASE_DIV > 1) ? $clog2(BASE_DIV) : 1;

  logic              pre_tick;
  logic [STAGES-2:0] chain;      // divide-by-two stages
  logic [STAGES-1:0] taps;

  // Prescaler.
  if (BASE_DIV > 1) begin : g_pre
    logic [PW-1:0] pre_cnt;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                          pre_cnt <= '0;
      else if (pre_cnt == PW'(BASE_DIV - 1)) pre_cnt <= '0;
      else                                 pre_cnt <= pre_cnt + 1'b1;
    end
    assign pre_tick = (pre_cnt == PW'(BASE_DIV - 1));
  end else begin : g_nopre
    assign pre_tick = 1'b1;
  end

  // Divide-by-two chain, advanced by the prescaler.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        chain <= '0;
    else if (pre_tick) chain <= chain + 1'b1;
  end

  // Tap k fires when the k lowest stages are all at one, i.e. once in 2^k.
  assign taps[0] = pre_tick;
  for (genvar k = 1; k < int'(STAGES); k++) begin : g_tap
    assign taps[k] = taps[k-1] & chain[k-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          tick <= 1'b0;
    else if (int'(sel) >= int'(STAGES))  tick <= taps[STAGES-1];
    else                                 tick <= taps[sel];
  end

endmodule
