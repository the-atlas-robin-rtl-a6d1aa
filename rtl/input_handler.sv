// input_handler: stores the fragments of one read-out link in the paged
// buffer memory.
//
// Link words come from the link data FIFO. A begin-of-fragment control word
// opens a fragment; a page number is then taken from the free page FIFO
// (FPF) and its start address is page_num << cfg_page_log2 (page sizes of
// 2^8..2^15 words, i.e. 1 kB to 128 kB; 2 kB is typical). Data words are
// written to consecutive buffer addresses. When a page is full its record
// (page info, L1ID, status, run number) is pushed into the used page FIFO
// (UPF) and the next word goes to a fresh page from the FPF, so a fragment
// is limited only by the number of free pages. At the end-of-fragment word
// the CRC over all fragment words is written after the last word and the
// last page record is pushed. The number of words counted between the
// control words is compared with the length word of the header; a mismatch,
// a wrong header marker, a fragment too short to carry an L1ID, a fragment
// cut off by a new begin-of-fragment, unknown control words and link
// errors (the err flag the link receiver sets on a word) are flagged in the
// status word; the link error bit is set in the record of the page that
// holds the flagged word and in all later pages of the fragment. Words
// outside a fragment are dropped.
//
// Timing: one word per buffer write grant (wr_valid/wr_ready); with the 1:1
// time-slice arbiter that is one word every second cycle. Page changes and
// record pushes take one cycle each, and the handler waits (stalls the link
// FIFO) while the FPF is empty or the UPF is full.
//
// From the design: paging, FPF/UPF usage, UPF record contents, length check
// and appended CRC. Own choices: header layout (robin_pkg), status bit
// positions, CRC-32 polynomial, the CRC word counting in the page length.
module input_handler
  import robin_pkg::*;
#(
  parameter int unsigned AW = BUF_AW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [3:0]            cfg_page_log2,
  // link data FIFO
  input  logic                  in_valid,
  input  link_word_t            in_word,
  output logic                  in_pop,
  // free page FIFO
  input  logic                  fpf_empty,
  input  logic [PAGE_NUM_W-1:0] fpf_page,
  output logic                  fpf_pop,
  // used page FIFO
  input  logic                  upf_full,
  output logic                  upf_push,
  output upf_record_t           upf_rec,
  // buffer write port
  output logic                  wr_valid,
  output logic [AW-1:0]         wr_addr,
  output logic [31:0]           wr_data,
  input  logic                  wr_ready,
  // monitoring
  output logic [31:0]           frag_count
);
  typedef enum logic [2:0] {S_IDLE, S_DATA, S_GETPAGE, S_CRC, S_CLOSE} state_e;
  state_e state, ret_state;

  logic [PAGE_NUM_W-1:0] page_num;
  logic                  page_valid, first_page, closing_last;
  logic [PAGE_LEN_W:0]   wcnt;         // words in the current page
  logic [31:0]           idx;          // fragment word index
  logic [31:0]           hdr_len, run_number, l1id;
  logic                  bad_marker, ctrl_error, truncated, link_error;
  logic [PAGE_LEN_W:0]   page_words;
  logic                  page_full;
  logic                  crc_init, crc_en;
  logic [31:0]           crc_val;
  logic                  is_bof, is_eof, data_fire;

  assign page_words = (PAGE_LEN_W+1)'(1) << cfg_page_log2;
  assign page_full  = (wcnt == page_words);
  assign is_bof = in_word.ctrl && (in_word.data[31:16] == CTRL_BOF);
  assign is_eof = in_word.ctrl && (in_word.data[31:16] == CTRL_EOF);

  crc32 u_crc (
    .clk, .rst_n, .init(crc_init), .byte_en(1'b0), .byte_in(8'h00),
    .word_en(crc_en), .word_in(in_word.data), .crc(), .crc_out(crc_val)
  );

  always_comb begin
    wr_addr  = (AW'(page_num) << cfg_page_log2) + AW'(wcnt);
    wr_data  = (state == S_CRC) ? crc_val : in_word.data;
    wr_valid = 1'b0;
    if (page_valid && !page_full) begin
      if (state == S_CRC) wr_valid = 1'b1;
      if (state == S_DATA && in_valid && !in_word.ctrl) wr_valid = 1'b1;
    end
  end

  assign data_fire = (state == S_DATA) && wr_valid && wr_ready;
  assign crc_en    = data_fire;
  assign fpf_pop   = (state == S_GETPAGE) && !fpf_empty;
  assign upf_push  = (state == S_CLOSE) && !upf_full;

  always_comb begin
    in_pop   = 1'b0;
    crc_init = 1'b0;
    case (state)
      S_IDLE: if (in_valid) begin
        in_pop   = 1'b1;
        crc_init = is_bof;
      end
      S_DATA: if (in_valid) begin
        // BOF is left for the next fragment; EOF waits for a page for the CRC
        if (in_word.ctrl) in_pop = !is_bof && (page_valid || !is_eof);
        else              in_pop = data_fire;
      end
      default: ;
    endcase
  end

  always_comb begin
    upf_rec = '0;
    upf_rec.page_num   = page_num;
    upf_rec.page_len   = PAGE_LEN_W'(wcnt);    // a full 128 kB page wraps to 0
    upf_rec.l1id       = l1id;
    upf_rec.run_number = run_number;
    upf_rec.status.first_page   = first_page;
    upf_rec.status.last_page    = closing_last;
    upf_rec.status.ctrl_error   = ctrl_error;
    upf_rec.status.truncated    = truncated;
    upf_rec.status.link_error   = link_error;
    upf_rec.status.bad_marker   = bad_marker;
    upf_rec.status.no_l1id      = closing_last && (idx <= HDR_W_L1ID);
    upf_rec.status.len_mismatch = closing_last && (hdr_len != idx);
    upf_rec.status.crc_appended = closing_last;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ret_state <= S_DATA;
      page_num <= '0;
      page_valid <= 1'b0;
      first_page <= 1'b0;
      closing_last <= 1'b0;
      wcnt <= '0;
      idx <= '0;
      hdr_len <= '0;
      run_number <= '0;
      l1id <= '0;
      bad_marker <= 1'b0;
      ctrl_error <= 1'b0;
      truncated <= 1'b0;
      link_error <= 1'b0;
      frag_count <= '0;
    end else begin
      case (state)
        S_IDLE: if (in_valid && is_bof) begin
          state <= S_DATA;
          page_valid <= 1'b0;
          first_page <= 1'b1;
          closing_last <= 1'b0;
          idx <= '0;
          hdr_len <= '0;
          run_number <= '0;
          l1id <= '0;
          bad_marker <= 1'b0;
          ctrl_error <= 1'b0;
          truncated <= 1'b0;
          link_error <= in_word.err;
        end
        S_DATA: begin
          if (in_valid && in_pop && in_word.err) link_error <= 1'b1;
          if (!page_valid && in_valid && (!in_word.ctrl || is_eof || is_bof)) begin
            // a word must be stored (data, or the CRC at the end): get a page
            ret_state <= S_DATA;
            state <= S_GETPAGE;
          end else if (in_valid && in_word.ctrl) begin
            if (is_eof || is_bof) begin
              truncated <= truncated | is_bof;
              state <= S_CRC;
            end else begin
              ctrl_error <= 1'b1;
            end
          end else if (data_fire) begin
            wcnt <= wcnt + 1'b1;
            idx <= idx + 1'b1;
            case (idx)
              32'(HDR_W_MARK): bad_marker <= (in_word.data != HDR_MARKER);
              32'(HDR_W_LEN):  hdr_len    <= in_word.data;
              32'(HDR_W_RUN):  run_number <= in_word.data;
              32'(HDR_W_L1ID): l1id       <= in_word.data;
              default: ;
            endcase
            if (wcnt + 1'b1 == page_words) state <= S_CLOSE;  // page full
          end
        end
        S_GETPAGE: if (!fpf_empty) begin
          page_num <= fpf_page;
          page_valid <= 1'b1;
          wcnt <= '0;
          state <= ret_state;
        end
        S_CRC: begin
          if (!page_valid) begin
            ret_state <= S_CRC;
            state <= S_GETPAGE;
          end else if (wr_valid && wr_ready) begin
            wcnt <= wcnt + 1'b1;
            closing_last <= 1'b1;
            state <= S_CLOSE;
          end
        end
        S_CLOSE: if (!upf_full) begin
          first_page <= 1'b0;
          page_valid <= 1'b0;
          if (closing_last) begin
            frag_count <= frag_count + 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_DATA;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
