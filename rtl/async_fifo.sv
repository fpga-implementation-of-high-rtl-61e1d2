// async_fifo: dual-clock FIFO between the host and the UART.
//
// Two of these sit in the UART: one holds characters from the host until the
// transmitter can take them, the other holds received characters until the
// host reads them. Each side runs on its own clock, so the host may run at any
// frequency while the UART side runs at 25 MHz, and neither side loses data
// while the other is busy. This is the document's FIFO; its depth and the
// construction are this design's choices.
//
// Construction: DEPTH words (a power of two) in a register array. Write and
// read pointers are DEPTH*2 binary counters; each is converted to Gray code
// and passed through a two-flop synchronizer into the other domain, where full
// and empty are computed against the local pointer. full and empty are
// therefore pessimistic for two clocks of the other domain after a change.
//
// Interface: a write with wr_en while full, or a read with rd_en while empty,
// is ignored (assertions flag it). rdata shows the oldest word whenever empty
// is 0 (first-word fall-through); rd_en removes it at the clock edge. Both
// resets are active low and clear their side's pointers; assert them together.
module async_fifo #(
  parameter int unsigned WIDTH = 11,
  parameter int unsigned DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1_rgray, wq2_rgray;   // read pointer seen by the write side
  logic [AW:0] rq1_wgray, rq2_wgray;   // write pointer seen by the read side
  logic [AW:0] wbin_nx, rbin_nx;
  logic        do_wr, do_rd;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  assign do_wr   = wr_en && !full;
  assign wbin_nx = wbin + (AW+1)'(do_wr);

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin      <= '0;
      wgray     <= '0;
      wq1_rgray <= '0;
      wq2_rgray <= '0;
    end else begin
      wbin      <= wbin_nx;
      wgray     <= bin2gray(wbin_nx);
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
    end
  end

  // Full when the pointers differ only in their two top bits (Gray code).
  assign full = (wgray == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});

  // ---------------- read side ----------------
  assign do_rd   = rd_en && !empty;
  assign rbin_nx = rbin + (AW+1)'(do_rd);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin      <= '0;
      rgray     <= '0;
      rq1_wgray <= '0;
      rq2_wgray <= '0;
    end else begin
      rbin      <= rbin_nx;
      rgray     <= bin2gray(rbin_nx);
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
    end
  end

  assign empty = (rgray == rq2_wgray);
  assign rdata = mem[rbin[AW-1:0]];

  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n) wr_en |-> !full)
    else $error("async_fifo: write while full");
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) rd_en |-> !empty)
    else $error("async_fifo: read while empty");

endmodule
