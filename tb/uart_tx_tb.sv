// uart_tx_tb: checks frame format, bit timing and double buffering of uart_tx.
//
// The tick enable is high one cycle in TDIV, so a bit lasts 16 * TDIV clocks.
// A decoder in the bench waits for each falling edge on txd, samples the
// middle of each of the 12 bits and compares them with a frame built here from
// the character (start 0, d0..d7, identifier, parity = odd number of ones in
// the nine bits, stop 1). Characters are loaded as soon as treg_e allows, so
// the second character waits in the buffer while the first is shifted out;
// the bench checks that treg_e falls after a load and rises again when the
// shift register takes the character, and that consecutive frames start
// exactly 12 bit times apart.
module uart_tx_tb;
  import uart_pkg::*;
  localparam int TDIV = 2;
  localparam int BIT  = 16 * TDIV;
  localparam int NCH  = 24;

  logic clk = 1'b0, rst_n = 1'b0, tick, load = 1'b0;
  uart_char_t din;
  logic treg_e, tsr_e, txd;
  int checks = 0, failures = 0;
  int tdiv_cnt = 0;
  uart_char_t sent[$];
  longint cyc = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    tdiv_cnt <= (tdiv_cnt == TDIV - 1) ? 0 : tdiv_cnt + 1;
  end
  assign tick = (tdiv_cnt == TDIV - 1);

  uart_tx dut (.clk, .rst_n, .tick, .load, .din, .treg_e, .tsr_e, .txd);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Producer: load characters whenever the buffer is empty.
  initial begin
    din = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(treg_e && tsr_e && txd, "idle state after reset");
    for (int i = 0; i < NCH; i++) begin
      uart_char_t c;
      c.is_addr = (i % 5 == 0);
      c.data    = (i == 1) ? 8'hFF : (i == 2) ? 8'h00 : 8'($urandom);
      while (!treg_e) @(posedge clk);
      #1 load = 1'b1; din = c;
      @(posedge clk);
      sent.push_back(c);
      #1 load = 1'b0;
      check(!treg_e, "treg_e must fall after a load");
    end
  end

  // Decoder.
  initial begin
    longint prev_start = -1;
    int nrx = 0;
    @(posedge rst_n);
    while (nrx < NCH) begin
      logic [11:0] got, exp;
      longint st;
      uart_char_t c;
      @(negedge txd);
      st = cyc;
      for (int b = 0; b < 12; b++) begin
        repeat ((b == 0) ? BIT / 2 : BIT) @(posedge clk);
        got[b] = txd;
      end
      c = sent[nrx];
      exp = {1'b1, 1'($countones(c) % 2), c.is_addr, c.data, 1'b0};
      check(got == exp, $sformatf("frame %0d: got %03h expected %03h", nrx, got, exp));
      if (prev_start >= 0)
        check(st - prev_start == 12 * BIT,
              $sformatf("frame %0d starts %0d clocks after the previous, expected %0d",
                        nrx, st - prev_start, 12 * BIT));
      prev_start = st;
      nrx++;
    end
    repeat (BIT) @(posedge clk);
    check(tsr_e && treg_e && txd, "idle after the last frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCH * 12 * BIT + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
