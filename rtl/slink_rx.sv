// slink_rx: receive side of the S-Link protocol engine for one link.
//
// The deserialiser delivers 16-bit characters with a data-valid and a
// control flag. Two characters form one 32-bit S-Link word, lower half
// first; a word whose two characters carry the control flag is an S-Link
// control word (begin/end of fragment), one with no flag a data word. An
// idle character (rx_dv low) between words realigns the pairing. A pair
// whose flags disagree is a link error: it is dropped and counted, and the
// next word delivered carries the err flag, so that the input handler can
// mark the fragment's page records with a link error. The
// engine passes flow control back: tx_xoff follows the channel's XOFF
// request so the link source pauses before the data FIFO overflows.
// Output words are registered: word_valid is high for one cycle, the cycle
// after the second character. The existence of the engine follows the
// design; its character framing is this implementation's own choice.
module slink_rx
  import robin_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] rxd,
  input  logic        rx_dv,
  input  logic        rx_ctl,
  input  logic        xoff_req,
  output logic        tx_xoff,
  output logic        word_valid,
  output link_word_t  word,
  output logic [15:0] err_count
);
  logic        have_low, low_ctl, err_pend;
  logic [15:0] low;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_low <= 1'b0;
      low_ctl <= 1'b0;
      low <= '0;
      word_valid <= 1'b0;
      word <= '0;
      err_count <= '0;
      err_pend <= 1'b0;
      tx_xoff <= 1'b0;
    end else begin
      tx_xoff <= xoff_req;
      word_valid <= 1'b0;
      if (!rx_dv) begin
        have_low <= 1'b0;
      end else if (!have_low) begin
        have_low <= 1'b1;
        low <= rxd;
        low_ctl <= rx_ctl;
      end else begin
        have_low <= 1'b0;
        if (low_ctl == rx_ctl) begin
          word_valid <= 1'b1;
          word <= '{err: err_pend, ctrl: rx_ctl, data: {rxd, low}};
          err_pend <= 1'b0;
        end else begin
          err_count <= err_count + 1'b1;
          err_pend <= 1'b1;
        end
      end
    end
  end
endmodule
