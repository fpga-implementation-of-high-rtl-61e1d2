// uart_tx: double-buffered transmitter for 9-bit characters.
//
// A character (eight bits plus the address/data identifier) is loaded into
// the transmit buffer with a one-cycle load pulse while treg_e is high. On the
// next baud tick, once the shift register is idle, the buffer is copied into
// the 12-bit shift register as {stop 1, parity, identifier, d7..d0, start 0}
// and the buffer is free again, so a second character can be loaded while the
// first one is still being shifted out. Frames then follow each other with no
// idle bit between them. Each bit is held on txd for 16 ticks; the LSB of the
// shift register goes out first. The buffer, the shift register, the treg_e
// flag and the frame layout follow the document; the 16x tick and the
// back-to-back start on the tick boundary are this design's choices.
//
// Interface: load/din are sampled at a clock edge when treg_e is 1; a load
// while treg_e is 0 is a protocol error (an assertion flags it, the character
// is dropped). tsr_e is 1 while nothing is being shifted out.
module uart_tx
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,    // 16x bit-rate enable from baud_gen
  input  logic       load,    // write din into the transmit buffer
  input  uart_char_t din,
  output logic       treg_e,  // transmit buffer empty
  output logic       tsr_e,   // shift register idle
  output logic       txd      // serial output, idles high
);

  uart_char_t                     tbuf;
  logic                           tbuf_full;
  logic [FRAME_BITS-1:0]          tsr;
  logic                           busy;
  logic [$clog2(OVERSAMPLE)-1:0]  sub;     // tick count inside a bit
  logic [$clog2(FRAME_BITS)-1:0]  bitn;    // bit being sent
  logic                           frame_done;
  logic                           start_next;

  assign treg_e     = !tbuf_full;
  assign tsr_e      = !busy;
  assign frame_done = busy && tick && (sub == $clog2(OVERSAMPLE)'(OVERSAMPLE - 1))
                      && (bitn == $clog2(FRAME_BITS)'(FRAME_BITS - 1));
  // The shift register takes the buffer on a tick when it is idle or is
  // finishing its stop bit.
  assign start_next = tbuf_full && tick && (!busy || frame_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tbuf      <= '0;
      tbuf_full <= 1'b0;
    end else if (start_next) begin
      tbuf_full <= 1'b0;
    end else if (load && !tbuf_full) begin
      tbuf      <= din;
      tbuf_full <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tsr  <= '1;
      busy <= 1'b0;
      sub  <= '0;
      bitn <= '0;
    end else if (start_next) begin
      tsr  <= {1'b1, char_parity(tbuf), tbuf, 1'b0};
      busy <= 1'b1;
      sub  <= '0;
      bitn <= '0;
    end else if (frame_done) begin
      busy <= 1'b0;
      tsr  <= '1;
    end else if (busy && tick) begin
      if (sub == $clog2(OVERSAMPLE)'(OVERSAMPLE - 1)) begin
        sub  <= '0;
        bitn <= bitn + 1'b1;
        tsr  <= {1'b1, tsr[FRAME_BITS-1:1]};
      end else begin
        sub <= sub + 1'b1;
      end
    end
  end

  assign txd = busy ? tsr[0] : 1'b1;

  // A character may only be loaded into an empty buffer.
  a_load_when_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                      load |-> treg_e)
    else $error("uart_tx: load while transmit buffer full");

endmodule
