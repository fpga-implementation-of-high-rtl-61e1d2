// uart_rx_tb: checks reception, the three error flags and glitch rejection.
//
// The bench drives rxd itself, one bit every 16 * TDIV clocks, with the tick
// enable high one cycle in TDIV. It sends random good characters (address and
// data), characters with the parity bit inverted, characters with a 0 stop
// bit, two characters without reading the first (overrun), and a short low
// glitch that must not start a frame. For each frame it checks dout, perr,
// ferr and oerr against values computed here, and that drdy rises between
// 11.5 bit times (middle of the stop bit) and 11.5 bit times plus a few
// clocks of synchronizer and tick delay after the start edge.
module uart_rx_tb;
  import uart_pkg::*;
  localparam int TDIV = 2;
  localparam int BIT  = 16 * TDIV;

  logic clk = 1'b0, rst_n = 1'b0, tick, rxd = 1'b1, read = 1'b0;
  uart_char_t dout;
  logic drdy, perr, ferr, oerr;
  int checks = 0, failures = 0;
  int tdiv_cnt = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    tdiv_cnt <= (tdiv_cnt == TDIV - 1) ? 0 : tdiv_cnt + 1;
  end
  assign tick = (tdiv_cnt == TDIV - 1);

  uart_rx dut (.clk, .rst_n, .tick, .rxd, .read, .dout, .drdy, .perr, .ferr, .oerr);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Drive one frame onto rxd; returns the cycle of the start edge.
  task automatic send(input uart_char_t c, input bit bad_par, input bit bad_stop,
                      output longint t0);
    logic [11:0] f;
    f = {~bad_stop, 1'($countones(c) % 2) ^ bad_par, c.is_addr, c.data, 1'b0};
    @(posedge clk);
    t0 = cyc;
    for (int b = 0; b < 12; b++) begin
      rxd <= f[b];
      repeat (BIT) @(posedge clk);
    end
    rxd <= 1'b1;
    if (bad_stop) repeat (BIT) @(posedge clk);
  endtask

  task automatic take();
    @(posedge clk); read <= 1'b1;
    @(posedge clk); read <= 1'b0;
    @(posedge clk);
    check(!drdy && !oerr, "read clears drdy and oerr");
  endtask

  // Record when drdy rises.
  longint drdy_rise;
  logic drdy_q = 1'b0;
  always_ff @(posedge clk) begin
    drdy_q <= drdy;
    if (drdy && !drdy_q) drdy_rise <= cyc;
  end

  initial begin
    longint t0;
    uart_char_t c;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (4) @(posedge clk);
    check(!drdy && !perr && !ferr && !oerr, "reset state");

    // Good characters.
    for (int i = 0; i < 20; i++) begin
      c.is_addr = 1'($urandom);
      c.data    = 8'($urandom);
      send(c, 0, 0, t0);
      repeat (8) @(posedge clk);
      check(drdy && dout == c && !perr && !ferr && !oerr,
            $sformatf("char %0d: drdy=%0b dout=%03h exp %03h perr=%0b ferr=%0b oerr=%0b",
                      i, drdy, dout, c, perr, ferr, oerr));
      check(drdy_rise - t0 >= 11 * BIT + BIT / 2 - 1 && drdy_rise - t0 <= 11 * BIT + BIT / 2 + TDIV + 4,
            $sformatf("char %0d: drdy %0d clocks after start edge", i, drdy_rise - t0));
      take();
    end

    // Parity error.
    c = '{is_addr: 1'b0, data: 8'hA5};
    send(c, 1, 0, t0);
    repeat (8) @(posedge clk);
    check(drdy && perr && !ferr && dout == c, "parity error flagged");
    take();

    // Frame error, then a good character must still be received.
    c = '{is_addr: 1'b1, data: 8'h3C};
    send(c, 0, 1, t0);
    check(drdy && ferr && !perr && dout == c, "frame error flagged");
    take();
    c = '{is_addr: 1'b0, data: 8'h96};
    send(c, 0, 0, t0);
    repeat (8) @(posedge clk);
    check(drdy && !ferr && !perr && dout == c, "good character after frame error");
    take();

    // Overrun: two characters, no read in between.
    c = '{is_addr: 1'b0, data: 8'h11};
    send(c, 0, 0, t0);
    c = '{is_addr: 1'b0, data: 8'h22};
    send(c, 0, 0, t0);
    repeat (8) @(posedge clk);
    check(drdy && oerr && dout == c, "overrun flagged, newest character kept");
    take();

    // Glitch shorter than half a bit.
    @(posedge clk); rxd <= 1'b0;
    repeat (BIT / 4) @(posedge clk);
    rxd <= 1'b1;
    repeat (13 * BIT) @(posedge clk);
    check(!drdy, "glitch must not produce a character");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * 13 * BIT) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
