// baud_gen_tb: checks the tick period of every rate setting.
//
// Two generators run side by side: one with the default parameters
// (no prescaler, eight rates) and one with BASE_DIV = 3 and four rates. For
// each sel value the bench waits for the rate to settle, then measures the
// clock cycles between several consecutive ticks and expects exactly
// BASE_DIV * 2^sel, and checks that tick is never high for two cycles in a row
// on the slower settings.
module baud_gen_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [2:0] sel_a;
  logic [1:0] sel_b;
  logic tick_a, tick_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  baud_gen dut_a (.clk, .rst_n, .sel(sel_a), .tick(tick_a));
  baud_gen #(.BASE_DIV(3), .STAGES(4)) dut_b (.clk, .rst_n, .sel(sel_b), .tick(tick_b));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Measure the spacing of ticks on one generator.
  task automatic measure(input bit which, input int expect_period);
    int last, n, now_c;
    bit t;
    last = -1; n = 0; now_c = 0;
    // let the selection settle for one full period
    repeat (expect_period + 2) @(posedge clk);
    while (n < 5) begin
      @(posedge clk);
      now_c++;
      t = which ? tick_b : tick_a;
      if (t) begin
        if (last >= 0) begin
          check(now_c - last == expect_period,
                $sformatf("gen %0d period %0d, expected %0d", which, now_c - last, expect_period));
          n++;
        end
        last = now_c;
      end
      if (now_c > 20 * expect_period + 50) begin
        check(1'b0, $sformatf("gen %0d: no ticks at expected period %0d", which, expect_period));
        break;
      end
    end
  endtask

  initial begin
    sel_a = '0; sel_b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 8; s++) begin
      sel_a = 3'(s);
      measure(1'b0, 1 << s);
    end
    for (int s = 0; s < 4; s++) begin
      sel_b = 2'(s);
      measure(1'b1, 3 * (1 << s));
    end
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
