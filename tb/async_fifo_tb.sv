// async_fifo_tb: checks ordering, full and empty of the dual-clock FIFO.
//
// The write clock runs at 25 MHz (40 ns) as on the UART side and the read
// clock at 7 ns, then the read clock is slowed to 130 ns so the FIFO fills.
// Writes and reads are attempted at random, only when the flags allow, and a
// queue in the bench checks that every word comes out once and in order. The
// bench also checks that the FIFO is empty after reset, that full rises after
// exactly DEPTH writes with no reads, and that empty rises again once all
// words have been read.
module async_fifo_tb;
  localparam int W = 11, D = 16;

  logic wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b0, rrst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  int rhalf = 3500;   // read clock half period in ps
  logic [W-1:0] q[$];
  bit   wr_go = 1'b0, rd_go = 1'b0;
  int   nwr = 0, nrd = 0;

  always #20 wclk = ~wclk;
  always begin #(rhalf * 1ps); rclk = ~rclk; end

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.wclk, .wrst_n, .wr_en, .wdata, .full,
                                         .rclk, .rrst_n, .rd_en, .rdata, .empty);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Writer
  always @(posedge wclk) begin
    if (wr_en) begin q.push_back(wdata); nwr++; end
    #1;
    wr_en = wr_go && !full && ($urandom % 2);
    wdata = W'($urandom);
  end

  // Reader
  always @(posedge rclk) begin
    if (rd_en) begin
      if (q.size() == 0) check(1'b0, "read with nothing written");
      else check(rdata == q.pop_front(), "word order");
      nrd++;
    end
    #1;
    rd_en = rd_go && !empty && ($urandom % 2);
  end

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1'b1; rrst_n = 1'b1;
    repeat (3) @(posedge wclk);
    check(empty && !full, "empty after reset");

    // Fill with no reads: full after exactly D writes.
    for (int i = 0; i < D; i++) begin
      check(!full, $sformatf("not full after %0d writes", i));
      @(negedge wclk); wr_en = 1'b1; wdata = W'(i * 3 + 1);
      @(posedge wclk); #2 wr_en = 1'b0;
    end
    @(negedge wclk);
    check(full, "full after DEPTH writes");
    repeat (4) @(posedge rclk);
    check(!empty, "not empty when full");

    // Random traffic, fast reader then slow reader.
    rd_go = 1'b1; wr_go = 1'b1;
    repeat (400) @(posedge wclk);
    rhalf = 65000;
    repeat (400) @(posedge wclk);
    wr_go = 1'b0;
    rhalf = 3500;
    repeat (200) @(posedge wclk);
    check(empty && q.size() == 0, "drained");
    check(nrd == nwr && nwr > 200, $sformatf("wrote %0d read %0d", nwr, nrd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
