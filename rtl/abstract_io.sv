// abstract_io: word-wide I/O port standing in for a UART or USB link.
//
// The processor side has put_word (push a 32-bit word towards the off-chip
// system) and get_word (take the oldest word received from it). Each
// direction is a DEPTH-word FIFO. The off-chip side is a pair of
// valid/ready word streams: tx_* leaves the chip, rx_* enters it; a word
// moves on a clock edge where valid and ready are both high.
//
// Flags: tx_full (a put_word now would be dropped) and rx_avail (get_word
// returns a valid word: get_data shows it combinationally, get pops it).
// The original design adds two abstract I/Os with put/get word functions to move
// data off chip; the FIFOs, their depth and the stream handshake are this
// design's choices.
module abstract_io #(
  parameter int DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor side
  input  logic        put,
  input  logic [31:0] put_data,
  input  logic        get,
  output logic [31:0] get_data,
  output logic        tx_full,
  output logic        rx_avail,
  // off-chip side
  output logic        tx_valid,
  output logic [31:0] tx_data,
  input  logic        tx_ready,
  input  logic        rx_valid,
  input  logic [31:0] rx_data,
  output logic        rx_ready
);
  logic tx_empty, rx_empty, rx_full;

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_tx (
    .clk, .rst_n,
    .push (put), .wdata (put_data),
    .pop  (tx_ready), .rdata (tx_data),
    .empty(tx_empty), .full (tx_full)
  );

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_rx (
    .clk, .rst_n,
    .push (rx_valid), .wdata (rx_data),
    .pop  (get), .rdata (get_data),
    .empty(rx_empty), .full (rx_full)
  );

  assign tx_valid = !tx_empty;
  assign rx_ready = !rx_full;
  assign rx_avail = !rx_empty;
endmodule
