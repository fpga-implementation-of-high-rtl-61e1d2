// uart_pkg: types and constants shared by the UART with automatic address
// identification.
//
// A character on the line is 12 bits long and is sent least significant bit
// first:
//
//   start(0) | d0 .. d7 | A/D identifier | parity | stop(1)
//
// The nine payload bits are the eight data or address bits plus the
// identifier bit, which is 1 for an address character and 0 for a data
// character. The parity bit is the XOR of those nine bits, so it is 1 when
// they hold an odd number of ones. The receiver and transmitter work on a
// 16x oversampling enable from the baud rate generator; the oversampling
// factor is this design's choice.
package uart_pkg;

  // One character: identifier bit on top, then the byte.
  typedef struct packed {
    logic       is_addr;  // 1 = address character, 0 = data character
    logic [7:0] data;
  } uart_char_t;

  // A received character with the per-character error flags.
  typedef struct packed {
    logic       ferr;     // stop bit was 0
    logic       perr;     // parity bit did not match the payload
    uart_char_t ch;
  } rx_word_t;

  localparam int unsigned OVERSAMPLE   = 16;                 // enable ticks per bit
  localparam int unsigned PAYLOAD_BITS = $bits(uart_char_t); // 9
  localparam int unsigned FRAME_BITS   = PAYLOAD_BITS + 3;   // start, parity, stop

  // Parity bit of a character: 1 when the nine payload bits hold an odd
  // number of ones.
  function automatic logic char_parity(uart_char_t c);
    return ^c;
  endfunction

endpackage
