// uart_rx: receiver for 12-bit frames with parity, frame and overflow checks.
//
// rxd passes through a two-flop synchronizer. In IDLE the receiver waits for a
// baud tick that sees the line low, then counts 8 ticks to the middle of the
// start bit; if the line is high again there, the edge was a glitch and the
// receiver goes back to IDLE. Otherwise it samples every 16 ticks, in the middle
// of each bit: nine payload bits (d0..d7, identifier), the parity bit and the
// stop bit. At the stop bit the frame is complete: dout takes the nine payload
// bits, perr is set when the XOR of the nine bits differs from the received
// parity bit, ferr is set when the stop bit is 0, and drdy goes high. A stop
// bit of 0 also makes the receiver wait for the line to return high before it
// looks for the next start bit.
//
// The consumer takes a character by pulsing read while drdy is 1; that clears
// drdy. When a frame completes while drdy is still 1 and read is not given,
// the unread character is overwritten and oerr is set; oerr stays set until
// the next read. perr, ferr and dout describe the character now held.
//
// The error checks and the signal names follow the document. The document says
// PErr is 1 when there is *no* parity error, but calls it an error flag like
// FErr and OErr; here perr is 1 when there is a parity error. Oversampling,
// mid-bit sampling, glitch rejection and overwrite-on-overflow are this
// design's choices.
module uart_rx
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,    // 16x bit-rate enable from baud_gen
  input  logic       rxd,     // serial input, idles high
  input  logic       read,    // consumer takes dout
  output uart_char_t dout,
  output logic       drdy,    // a character is waiting
  output logic       perr,    // parity error in the held character
  output logic       ferr,    // frame (stop bit) error in the held character
  output logic       oerr     // a character was overwritten before it was read
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_BITS, S_BREAK} state_t;

  localparam int unsigned SW = $clog2(OVERSAMPLE);
  localparam int unsigned BW = $clog2(FRAME_BITS);

  logic                     rxd_m, rxd_s;
  state_t                   state;
  logic [SW-1:0]            sub;
  logic [BW-1:0]            bitn;    // bits sampled after the start bit
  logic [PAYLOAD_BITS:0]    shreg;   // payload and parity
  logic                     sample;
  logic                     last_bit;
  logic                     done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxd_m <= 1'b1;
      rxd_s <= 1'b1;
    end else begin
      rxd_m <= rxd;
      rxd_s <= rxd_m;
    end
  end

  assign sample   = (state == S_BITS) && tick && (sub == SW'(OVERSAMPLE - 1));
  assign last_bit = (bitn == BW'(PAYLOAD_BITS + 1));      // the stop bit
  assign done     = sample && last_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      sub   <= '0;
      bitn  <= '0;
      shreg <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (tick && !rxd_s) begin
          state <= S_START;
          sub   <= '0;
        end
        S_START: if (tick) begin
          if (sub == SW'(OVERSAMPLE / 2 - 2)) begin
            // This tick is the eighth low sample: middle of the start bit.
            state <= rxd_s ? S_IDLE : S_BITS;
            sub   <= '0;
            bitn  <= '0;
          end else begin
            sub <= sub + 1'b1;
          end
        end
        S_BITS: if (tick) begin
          sub <= sub + 1'b1;   // wraps from 15 to 0 at each sample
          if (sample) begin
            if (last_bit) state <= rxd_s ? S_IDLE : S_BREAK;
            else begin
              shreg <= {rxd_s, shreg[PAYLOAD_BITS:1]};
              bitn  <= bitn + 1'b1;
            end
          end
        end
        S_BREAK: if (rxd_s) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Output register and error flags.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0;
      drdy <= 1'b0;
      perr <= 1'b0;
      ferr <= 1'b0;
      oerr <= 1'b0;
    end else begin
      if (done) begin
        dout <= shreg[PAYLOAD_BITS-1:0];
        perr <= (^shreg[PAYLOAD_BITS-1:0]) != shreg[PAYLOAD_BITS];
        ferr <= !rxd_s;
        drdy <= 1'b1;
        if (drdy && !read) oerr <= 1'b1;
        else               oerr <= 1'b0;
      end else if (read) begin
        drdy <= 1'b0;
        oerr <= 1'b0;
      end
    end
  end

endmodule
