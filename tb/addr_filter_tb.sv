// addr_filter_tb: checks address matching, data forwarding and dropping.
//
// The bench plays the receiver: it offers a random stream of address and data
// characters (a third of the addresses equal my_addr, some carry parity or
// frame errors) and holds each one until in_ready takes it. The FIFO side
// accepts at random (out_ready). A reference model in the bench tracks which
// slave is selected; every data character that arrives while the model is
// selected must come out on out_valid unchanged and in order, every other
// character must be consumed and not passed on, and hit/miss/drop must match
// the model. It also checks that a held data character is not taken while
// out_ready is low.
module addr_filter_tb;
  import uart_pkg::*;
  localparam logic [7:0] MY = 8'h5A;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready;
  rx_word_t in_word, out_word;
  logic selected, hit, miss, drop;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_drop = 0, n_fwd = 0;
  rx_word_t expq[$];

  always #5 clk = ~clk;

  addr_filter dut (.clk, .rst_n, .my_addr(MY), .in_valid, .in_word, .in_ready,
                   .out_valid, .out_word, .out_ready, .selected, .hit, .miss, .drop);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always_ff @(posedge clk) out_ready <= ($urandom % 3) != 0;

  // FIFO side: collect forwarded characters.
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      rx_word_t e;
      if (expq.size() == 0) check(1'b0, "unexpected forwarded character");
      else begin
        e = expq.pop_front();
        check(out_word == e, $sformatf("forwarded %03h expected %03h", out_word, e));
      end
      n_fwd++;
    end
  end

  initial begin
    bit model_sel = 1'b0;
    in_word = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!selected && !out_valid, "deselected after reset");
    for (int i = 0; i < 400; i++) begin
      rx_word_t w;
      bit ok;
      w.ch.is_addr = ($urandom % 4) == 0;
      w.ch.data    = (w.ch.is_addr && ($urandom % 2)) ? MY : 8'($urandom);
      w.perr       = ($urandom % 10) == 0;
      w.ferr       = ($urandom % 15) == 0;
      in_valid <= 1'b1;
      in_word  <= w;
      @(negedge clk);
      // model of the expected event
      ok = w.ch.is_addr && w.ch.data == MY && !w.perr && !w.ferr;
      check(hit  == (w.ch.is_addr && ok),  $sformatf("hit  for %03h", w));
      check(miss == (w.ch.is_addr && !ok), $sformatf("miss for %03h", w));
      check(drop == (!w.ch.is_addr && !model_sel), $sformatf("drop for %03h", w));
      check(out_valid == (!w.ch.is_addr && model_sel), $sformatf("out_valid for %03h", w));
      if (!w.ch.is_addr && model_sel) begin
        expq.push_back(w);
        // held until the FIFO side accepts
        while (!out_ready) begin
          check(!in_ready, "data taken while out_ready low");
          @(negedge clk);
        end
      end
      check(in_ready, "character not taken");
      n_hit += hit; n_miss += miss; n_drop += drop;
      @(posedge clk);
      if (w.ch.is_addr) model_sel = ok;
      #1 check(selected == model_sel, "selected state");
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    check(expq.size() == 0, "all expected characters forwarded");
    check(n_hit > 5 && n_miss > 5 && n_drop > 5 && n_fwd > 5, "every case exercised");
    $display("hits=%0d misses=%0d drops=%0d forwarded=%0d", n_hit, n_miss, n_drop, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
