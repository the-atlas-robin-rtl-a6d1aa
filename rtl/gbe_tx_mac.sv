// gbe_tx_mac: transmit half of the Gigabit Ethernet MAC (GMII) with
// flow-control messages.
//
// Responses from the GbE DMA engine arrive as 32-bit words with a byte keep
// mask (bytes are sent least significant first; kept bytes must start at
// byte 0, which covers the odd 16-bit header end). Because GMII cannot
// pause inside a frame, words are collected in a frame FIFO and a frame is
// started only when its last word is in (store and forward; a frame may
// hold up to FIFO_D words). Each frame is sent as preamble, start delimiter,
// the bytes, zero padding to 60 bytes, the CRC-32 check sequence and a
// 12-byte inter-frame gap. When the receive buffer's flow-control request
// changes, a flow-control message is sent between frames: an IEEE 802.3x
// PAUSE frame with PAUSE_QUANTA when the request rises and with zero (resume)
// when it falls. That the ROBIN sends a flow-control message follows the
// design; its form as an 802.3x PAUSE frame is this design's choice.
module gbe_tx_mac #(
  parameter int unsigned FIFO_D       = 512,
  parameter logic [47:0] SRC_MAC      = 48'h02_00_00_00_00_01,
  parameter logic [15:0] PAUSE_QUANTA = 16'hFFFF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  input  logic [3:0]  in_keep,
  input  logic        in_last,
  output logic        in_ready,
  input  logic        fc_req,
  output logic [7:0]  txd,
  output logic        tx_en,
  output logic [31:0] frame_count,
  output logic [31:0] pause_count
);
  typedef enum logic [2:0] {T_IDLE, T_PRE, T_DATA, T_PAD, T_FCS, T_IFG} tstate_e;
  tstate_e state;

  logic        f_full, f_empty, f_pop;
  logic [36:0] f_head;
  logic [$clog2(FIFO_D+1)-1:0] f_count;
  logic [15:0] frames_in;          // complete frames in the FIFO
  logic        is_pause, fc_q, pause_pend, pause_on;
  logic [15:0] bcnt;               // byte counter within the current state
  logic [1:0]  bidx;
  logic [7:0]  cur;
  logic        cur_last_byte, frame_end;
  logic        crc_init, crc_en;
  logic [31:0] crc_o;
  logic [2:0]  nb;

  sync_fifo #(.WIDTH(37), .DEPTH(FIFO_D)) u_fifo (
    .clk, .rst_n, .wr_en(in_valid && in_ready), .wr_data({in_last, in_keep, in_data}),
    .rd_en(f_pop), .rd_data(f_head), .full(f_full), .empty(f_empty), .count(f_count)
  );
  assign in_ready = !f_full;

  crc32 u_crc (
    .clk, .rst_n, .init(crc_init), .byte_en(crc_en), .byte_in(txd),
    .word_en(1'b0), .word_in(32'h0), .crc(), .crc_out(crc_o)
  );

  function automatic logic [7:0] pause_byte(input logic [15:0] i, input logic on);
    logic [143:0] f;
    f = {48'h01_80_C2_00_00_01, SRC_MAC, 16'h8808, 16'h0001, on ? PAUSE_QUANTA : 16'h0000};
    return (i < 16'd18) ? f[143 - 8*i -: 8] : 8'h00;
  endfunction

  always_comb begin
    nb = 3'(in_keep_count(f_head[35:32]));
    cur = 8'h00;
    cur_last_byte = 1'b0;
    if (is_pause) begin
      cur = pause_byte(bcnt, pause_on);
      cur_last_byte = (bcnt == 16'd17);
    end else begin
      cur = f_head[8*bidx +: 8];
      cur_last_byte = (3'(bidx) + 3'd1 >= nb) && f_head[36];
    end
    frame_end = (state == T_DATA) && cur_last_byte;
    f_pop = (state == T_DATA) && !is_pause && (3'(bidx) + 3'd1 >= nb);
    crc_init = (state == T_PRE);
    crc_en = (state == T_DATA) || (state == T_PAD);
    txd = 8'h00;
    tx_en = 1'b0;
    case (state)
      T_PRE:  begin tx_en = 1'b1; txd = (bcnt == 16'd7) ? 8'hD5 : 8'h55; end
      T_DATA: begin tx_en = 1'b1; txd = cur; end
      T_PAD:  begin tx_en = 1'b1; txd = 8'h00; end
      T_FCS:  begin tx_en = 1'b1; txd = crc_o[8*bcnt[1:0] +: 8]; end
      default: ;
    endcase
  end

  function automatic int in_keep_count(input logic [3:0] k);
    return int'(k[0]) + int'(k[1]) + int'(k[2]) + int'(k[3]);
  endfunction

  logic [15:0] flen;   // bytes of the frame so far (without preamble)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      frames_in <= '0;
      is_pause <= 1'b0;
      fc_q <= 1'b0;
      pause_pend <= 1'b0;
      pause_on <= 1'b0;
      bcnt <= '0;
      bidx <= '0;
      flen <= '0;
      frame_count <= '0;
      pause_count <= '0;
    end else begin
      fc_q <= fc_req;
      if (fc_req != fc_q) pause_pend <= 1'b1;
      frames_in <= frames_in + 16'(in_valid && in_ready && in_last)
                             - 16'(frame_end && !is_pause);
      case (state)
        T_IDLE: begin
          bcnt <= '0;
          bidx <= '0;
          flen <= '0;
          if (pause_pend && (fc_req == fc_q)) begin
            pause_pend <= 1'b0;
            pause_on <= fc_req;
            is_pause <= 1'b1;
            state <= T_PRE;
          end else if (frames_in != '0) begin
            is_pause <= 1'b0;
            state <= T_PRE;
          end
        end
        T_PRE: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 16'd7) begin
            bcnt <= '0;
            state <= T_DATA;
          end
        end
        T_DATA: begin
          bcnt <= bcnt + 1'b1;
          flen <= flen + 1'b1;
          bidx <= f_pop ? 2'd0 : bidx + 1'b1;
          if (cur_last_byte) begin
            if (flen + 1'b1 < 16'd60) state <= T_PAD;
            else begin
              state <= T_FCS;
              bcnt <= '0;
            end
          end
        end
        T_PAD: begin
          flen <= flen + 1'b1;
          if (flen + 1'b1 == 16'd60) begin
            state <= T_FCS;
            bcnt <= '0;
          end
        end
        T_FCS: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 16'd3) begin
            bcnt <= '0;
            state <= T_IFG;
            if (is_pause) pause_count <= pause_count + 1'b1;
            else frame_count <= frame_count + 1'b1;
          end
        end
        T_IFG: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 16'd11) state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
                                  (state == T_DATA && !is_pause) |-> !f_empty);
endmodule
