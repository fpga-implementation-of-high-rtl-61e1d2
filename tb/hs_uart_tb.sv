// hs_uart_tb: end-to-end test of two UARTs on one serial line, at the
// default parameters.
//
// Unit A is the master and unit B a slave with address 8'h5A; A's txd drives
// B's rxd (or, for error injection, the bench drives B's rxd itself) and B's
// txd drives A's rxd. UART clocks run at 25 MHz, host clocks at 100 MHz.
// Phases:
//   1. A sends data to B, to another slave, and to B again: B must deliver
//      exactly the data addressed to it, in order (address hit, miss, drop).
//      A's host writes faster than the line drains, so the transmit FIFO
//      fills and the host stalls; frames go out back to back thanks to the
//      transmit buffer.
//   2. B's host stops reading; A sends 19 data characters to B. The receive
//      FIFO fills, the 17th character waits in the receiver, and the 18th and
//      19th overwrite it: oerr must rise and B must deliver 1..16 and 19.
//   3. The bench drives B's line with a parity error, a frame error, a good
//      character and a corrupted address, which must deselect B.
//   4. Both units switch to baud_sel = 2 (a quarter of the rate); A sends to
//      B and the frame spacing must be 12 * 64 clocks.
//   5. B sends to A (full duplex direction).
// Each mechanism is counted, and one that never happened is a failure.
module hs_uart_tb;
  localparam logic [7:0] ADDR_A = 8'h21, ADDR_B = 8'h5A, ADDR_C = 8'h33;
  localparam realtime TCLK = 40ns;

  logic clk = 1'b0, host_clk = 1'b0, rst_n = 1'b0;
  logic [2:0] baud_sel = 3'd0;

  // unit A
  logic a_txd, a_rxd, a_tx_wr = 1'b0, a_tx_is_addr = 1'b0, a_tx_full, a_rx_rd = 1'b0;
  logic [7:0] a_tx_data = '0, a_rx_data;
  logic a_rx_perr, a_rx_ferr, a_rx_empty, a_treg_e, a_tx_idle, a_oerr, a_sel, a_hit, a_miss, a_drop;
  // unit B
  logic b_txd, b_rxd, b_tx_wr = 1'b0, b_tx_is_addr = 1'b0, b_tx_full, b_rx_rd = 1'b0;
  logic [7:0] b_tx_data = '0, b_rx_data;
  logic b_rx_perr, b_rx_ferr, b_rx_empty, b_treg_e, b_tx_idle, b_oerr, b_sel, b_hit, b_miss, b_drop;

  logic inject = 1'b0, tb_line = 1'b1;
  assign b_rxd = inject ? tb_line : a_txd;
  assign a_rxd = b_txd;

  always #(TCLK / 2) clk = ~clk;
  always #5ns host_clk = ~host_clk;

  hs_uart u_a (.clk, .rst_n, .host_clk, .host_rst_n(rst_n), .baud_sel, .my_addr(ADDR_A),
               .txd(a_txd), .rxd(a_rxd), .tx_wr(a_tx_wr), .tx_is_addr(a_tx_is_addr),
               .tx_data(a_tx_data), .tx_full(a_tx_full), .rx_rd(a_rx_rd), .rx_data(a_rx_data),
               .rx_perr(a_rx_perr), .rx_ferr(a_rx_ferr), .rx_empty(a_rx_empty),
               .treg_e(a_treg_e), .tx_idle(a_tx_idle), .oerr(a_oerr), .selected(a_sel),
               .addr_hit(a_hit), .addr_miss(a_miss), .data_drop(a_drop));
  hs_uart u_b (.clk, .rst_n, .host_clk, .host_rst_n(rst_n), .baud_sel, .my_addr(ADDR_B),
               .txd(b_txd), .rxd(b_rxd), .tx_wr(b_tx_wr), .tx_is_addr(b_tx_is_addr),
               .tx_data(b_tx_data), .tx_full(b_tx_full), .rx_rd(b_rx_rd), .rx_data(b_rx_data),
               .rx_perr(b_rx_perr), .rx_ferr(b_rx_ferr), .rx_empty(b_rx_empty),
               .treg_e(b_treg_e), .tx_idle(b_tx_idle), .oerr(b_oerr), .selected(b_sel),
               .addr_hit(b_hit), .addr_miss(b_miss), .data_drop(b_drop));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_hit = 0, n_miss = 0, n_drop = 0, n_oerr = 0, n_stall = 0, n_b2b = 0;
  int n_perr = 0, n_ferr = 0, n_slow = 0, n_duplex = 0;
  logic b_oerr_q = 1'b0;
  always_ff @(posedge clk) if (rst_n) begin
    n_hit  <= n_hit  + int'(b_hit);
    n_miss <= n_miss + int'(b_miss);
    n_drop <= n_drop + int'(b_drop);
    b_oerr_q <= b_oerr;
    if (b_oerr && !b_oerr_q) n_oerr <= n_oerr + 1;
  end

  // Frame monitor on A's line: frames that start exactly 12 bit times after
  // the previous one were sent back to back from the transmit buffer.
  initial begin
    realtime prev, now_t, bit_t;
    prev = -1.0;
    @(posedge rst_n);
    forever begin
      @(negedge a_txd);
      now_t = $realtime;
      bit_t = 16 * (1 << baud_sel) * TCLK;
      if (prev >= 0 && (now_t - prev) == 12 * bit_t) begin
        n_b2b++;
        if (baud_sel == 3'd2) n_slow++;
      end
      prev = now_t;
      #(11.5 * bit_t);
    end
  end

  // ---------------- host tasks ----------------
  task automatic a_send(input bit is_addr, input logic [7:0] d);
    @(posedge host_clk);
    while (a_tx_full) begin n_stall++; @(posedge host_clk); end
    #1 a_tx_wr = 1'b1; a_tx_is_addr = is_addr; a_tx_data = d;
    @(posedge host_clk);
    #1 a_tx_wr = 1'b0;
  endtask

  task automatic b_send(input bit is_addr, input logic [7:0] d);
    @(posedge host_clk);
    while (b_tx_full) @(posedge host_clk);
    #1 b_tx_wr = 1'b1; b_tx_is_addr = is_addr; b_tx_data = d;
    @(posedge host_clk);
    #1 b_tx_wr = 1'b0;
  endtask

  // B's host reader: runs while b_reading is set.
  typedef struct packed {logic ferr; logic perr; logic [7:0] d;} got_t;
  got_t b_got[$], a_got[$];
  bit b_reading = 1'b1;
  always @(posedge host_clk) begin
    if (b_rx_rd) b_got.push_back('{ferr: b_rx_ferr, perr: b_rx_perr, d: b_rx_data});
    if (a_rx_rd) a_got.push_back('{ferr: a_rx_ferr, perr: a_rx_perr, d: a_rx_data});
    #1;
    b_rx_rd = b_reading && !b_rx_empty;
    a_rx_rd = !a_rx_empty;
  end

  task automatic wait_line_idle(input int frames);
    repeat (frames * 12 * 16 * (1 << baud_sel) + 200) @(posedge clk);
  endtask

  task automatic expect_b(input logic [7:0] exp[$], input string phase);
    check(b_got.size() == exp.size(),
          $sformatf("%s: B delivered %0d characters, expected %0d", phase, b_got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < b_got.size(); i++)
      check(b_got[i] == '{ferr: 1'b0, perr: 1'b0, d: exp[i]},
            $sformatf("%s: char %0d got %03h expected %02h", phase, i, b_got[i], exp[i]));
    b_got.delete();
  endtask

  // Bench-driven frame on B's line.
  task automatic line_frame(input bit is_addr, input logic [7:0] d, input bit bad_par,
                            input bit bad_stop);
    logic [11:0] f;
    f = {~bad_stop, 1'(($countones(d) + is_addr) % 2) ^ bad_par, is_addr, d, 1'b0};
    for (int b = 0; b < 12; b++) begin
      tb_line = f[b];
      #(16 * (1 << baud_sel) * TCLK);
    end
    tb_line = 1'b1;
    #(2 * 16 * (1 << baud_sel) * TCLK);
  endtask

  initial begin
    logic [7:0] exp[$];
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(a_treg_e && a_tx_idle && a_rx_empty && b_rx_empty && !b_sel, "reset state");

    // ---- phase 1: addressing ----
    exp = {};
    a_send(1, ADDR_B);
    for (int i = 0; i < 5; i++) begin a_send(0, 8'(8'h10 + i)); exp.push_back(8'(8'h10 + i)); end
    a_send(1, ADDR_C);
    for (int i = 0; i < 3; i++) a_send(0, 8'(8'hE0 + i));
    a_send(1, ADDR_B);
    for (int i = 0; i < 12; i++) begin a_send(0, 8'(8'h40 + 7 * i)); exp.push_back(8'(8'h40 + 7 * i)); end
    wait_line_idle(20);
    check(n_hit == 2 && n_miss == 1 && n_drop == 3,
          $sformatf("phase 1 hit/miss/drop = %0d/%0d/%0d, expected 2/1/3", n_hit, n_miss, n_drop));
    expect_b(exp, "phase 1");

    // ---- phase 2: receive overrun ----
    b_reading = 1'b0;
    exp = {};
    a_send(1, ADDR_B);
    for (int i = 1; i <= 19; i++) begin
      a_send(0, 8'(i));
      if (i <= 16 || i == 19) exp.push_back(8'(i));
    end
    wait_line_idle(20);
    check(b_oerr, "oerr set after receive overrun");
    b_reading = 1'b1;
    wait_line_idle(1);
    check(!b_oerr, "oerr cleared once the held character is taken");
    expect_b(exp, "phase 2");

    // ---- phase 3: line errors ----
    inject = 1'b1;
    line_frame(1, ADDR_B, 0, 0);
    line_frame(0, 8'h0F, 1, 0);
    line_frame(0, 8'hF0, 0, 1);
    line_frame(0, 8'h77, 0, 0);
    line_frame(1, ADDR_B, 1, 0);   // corrupted address: deselect
    line_frame(0, 8'h99, 0, 0);    // must be dropped
    repeat (50) @(posedge clk);
    inject = 1'b0;
    check(b_got.size() == 3, $sformatf("phase 3: %0d characters delivered, expected 3", b_got.size()));
    if (b_got.size() == 3) begin
      check(b_got[0] == '{ferr: 1'b0, perr: 1'b1, d: 8'h0F}, "parity error delivered with perr");
      check(b_got[1] == '{ferr: 1'b1, perr: 1'b0, d: 8'hF0}, "frame error delivered with ferr");
      check(b_got[2] == '{ferr: 1'b0, perr: 1'b0, d: 8'h77}, "good character after errors");
      n_perr += int'(b_got[0].perr);
      n_ferr += int'(b_got[1].ferr);
    end
    check(!b_sel, "corrupted address deselects the slave");
    b_got.delete();

    // ---- phase 4: slower rate ----
    baud_sel = 3'd2;
    repeat (200) @(posedge clk);
    exp = {};
    a_send(1, ADDR_B);
    for (int i = 0; i < 4; i++) begin a_send(0, 8'(8'hC3 ^ i)); exp.push_back(8'(8'hC3 ^ i)); end
    wait_line_idle(6);
    expect_b(exp, "phase 4");

    // ---- phase 5: B to A ----
    b_send(1, ADDR_A);
    b_send(0, 8'hAB);
    b_send(0, 8'hCD);
    wait_line_idle(4);
    check(a_got.size() == 2 && a_got[0].d == 8'hAB && a_got[1].d == 8'hCD && !a_got[0].perr,
          $sformatf("phase 5: A received %0d characters", a_got.size()));
    n_duplex = a_got.size();

    $display("mechanisms: hit=%0d miss=%0d drop=%0d overrun=%0d tx_stall=%0d back_to_back=%0d parity_err=%0d frame_err=%0d slow_rate=%0d duplex=%0d",
             n_hit, n_miss, n_drop, n_oerr, n_stall, n_b2b, n_perr, n_ferr, n_slow, n_duplex);
    check(n_hit > 0,    "address hit happened");
    check(n_miss > 0,   "address miss happened");
    check(n_drop > 0,   "data drop happened");
    check(n_oerr > 0,   "receive overrun happened");
    check(n_stall > 0,  "transmit FIFO full stall happened");
    check(n_b2b > 0,    "back-to-back frames happened");
    check(n_perr > 0,   "parity error happened");
    check(n_ferr > 0,   "frame error happened");
    check(n_slow > 0,   "frames at the switched rate happened");
    check(n_duplex > 0, "reverse direction happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
