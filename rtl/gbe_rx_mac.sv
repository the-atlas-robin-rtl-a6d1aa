// gbe_rx_mac: receive half of the Gigabit Ethernet MAC (GMII, 8 bits at
// 125 MHz).
//
// A frame starts with preamble bytes 0x55 and the start-of-frame delimiter
// 0xD5, which are stripped. The remaining bytes run through the CRC-32 and
// a four-byte delay line, so that the frame check sequence is removed from
// the output: bytes leave four bytes after they arrived, with sof on the
// first. When rx_dv falls the frame ends: eof is pulsed together with
// good, which is set when the CRC residue matches, no rx_er was seen and
// the frame had at least 64 bytes. The MAC itself is named by the design;
// everything here follows IEEE 802.3 rather than the design text.
module gbe_rx_mac (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rxd,
  input  logic       rx_dv,
  input  logic       rx_er,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_sof,
  output logic       out_eof,
  output logic       out_good,
  output logic [15:0] crc_err_count
);
  localparam logic [31:0] RESIDUE = 32'hDEBB20E3;
  typedef enum logic [1:0] {R_IDLE, R_PRE, R_DATA, R_DROP} rstate_e;
  rstate_e state;
  logic [31:0] dly;
  logic [2:0]  fill;
  logic [15:0] nbytes;
  logic        err, first;
  logic        crc_init, crc_en;
  logic [31:0] crc;

  crc32 u_crc (
    .clk, .rst_n, .init(crc_init), .byte_en(crc_en), .byte_in(rxd),
    .word_en(1'b0), .word_in(32'h0), .crc(crc), .crc_out()
  );

  assign crc_init = (state != R_DATA);
  assign crc_en   = (state == R_DATA) && rx_dv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_IDLE;
      dly <= '0;
      fill <= '0;
      nbytes <= '0;
      err <= 1'b0;
      first <= 1'b0;
      out_valid <= 1'b0;
      out_data <= '0;
      out_sof <= 1'b0;
      out_eof <= 1'b0;
      out_good <= 1'b0;
      crc_err_count <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sof <= 1'b0;
      out_eof <= 1'b0;
      out_good <= 1'b0;
      case (state)
        R_IDLE: if (rx_dv) state <= (rxd == 8'h55) ? R_PRE : R_DROP;
        R_PRE: begin
          if (!rx_dv) state <= R_IDLE;
          else if (rxd == 8'hD5) begin
            state <= R_DATA;
            fill <= '0;
            nbytes <= '0;
            err <= rx_er;
            first <= 1'b1;
          end else if (rxd != 8'h55) state <= R_DROP;
        end
        R_DATA: begin
          if (rx_dv) begin
            dly <= {rxd, dly[31:8]};
            nbytes <= nbytes + 1'b1;
            err <= err | rx_er;
            if (fill == 3'd4) begin
              out_valid <= 1'b1;
              out_data <= dly[7:0];
              out_sof <= first;
              first <= 1'b0;
            end else begin
              fill <= fill + 1'b1;
            end
          end else begin
            out_eof <= 1'b1;
            out_good <= !err && (crc == RESIDUE) && (nbytes >= 16'd64);
            if (crc != RESIDUE) crc_err_count <= crc_err_count + 1'b1;
            state <= R_IDLE;
          end
        end
        R_DROP: if (!rx_dv) state <= R_IDLE;
      endcase
    end
  end
endmodule
