// addr_filter: automatic address identification for a slave UART.
//
// Sits between the receiver and the receive FIFO. Every received character
// carries an identifier bit. An address character (identifier 1) is always
// taken from the receiver and compared with this slave's address, my_addr:
// on a match the slave is selected, otherwise it is deselected. Address
// characters are never passed on. A data character (identifier 0) is passed
// on only while the slave is selected; while it is not, the character is taken
// from the receiver and dropped, so the host never has to look at data meant
// for another slave. This is the document's scheme; that an address character
// with a parity or frame error deselects the slave, and that address
// characters are not forwarded, are this design's choices.
//
// Interface: in_valid/in_ready form a ready/valid handshake with the receiver
// (in_ready drives the receiver's read), out_valid/out_ready with the FIFO.
// A data character for a selected slave waits in the receiver until the FIFO
// can take it; everything else is consumed in the cycle it appears. The
// selection changes one cycle after the address character is taken. hit, miss
// and drop are one-cycle event pulses for status and counting.
module addr_filter
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] my_addr,
  // from the receiver
  input  logic       in_valid,
  input  rx_word_t   in_word,
  output logic       in_ready,
  // to the receive FIFO
  output logic       out_valid,
  output rx_word_t   out_word,
  input  logic       out_ready,
  // status
  output logic       selected,
  output logic       hit,      // address character matched my_addr
  output logic       miss,     // address character did not match
  output logic       drop      // data character discarded
);

  logic is_addr;
  logic addr_ok;

  assign is_addr   = in_word.ch.is_addr;
  assign addr_ok   = !in_word.perr && !in_word.ferr && (in_word.ch.data == my_addr);

  assign out_valid = in_valid && !is_addr && selected;
  assign out_word  = in_word;
  assign in_ready  = in_valid && (is_addr || !selected || out_ready);

  assign hit  = in_valid && is_addr && addr_ok;
  assign miss = in_valid && is_addr && !addr_ok;
  assign drop = in_valid && !is_addr && !selected;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  selected <= 1'b0;
    else if (in_valid && is_addr) selected <= addr_ok;
  end

endmodule
