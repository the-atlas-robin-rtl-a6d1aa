// frag_generator: internal fragment data generator for link emulation.
//
// When enabled it produces complete fragments in the link word format of
// robin_pkg, as a read-out link would deliver them: a begin-of-fragment
// control word, the four header words (marker, total length, run number,
// L1ID), a payload counting up from the L1ID, and an end-of-fragment
// control word. cfg_words is the fragment length in words (header included,
// at least the four header words); the L1ID increments by one per fragment
// starting at cfg_first_l1id. One word is produced per cycle in which the
// consumer accepts (out_ready), so the rate is set by the link data FIFO
// and the buffer arbiter. Disabling takes effect at the next fragment
// boundary. The existence of the generator follows the design; its data
// pattern and control are this design's own choice.
module frag_generator
  import robin_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [15:0] cfg_words,
  input  logic [31:0] cfg_run,
  input  logic [31:0] cfg_first_l1id,
  input  logic        load,           // take cfg_first_l1id as next L1ID
  output logic        out_valid,
  output link_word_t  out_word,
  input  logic        out_ready,
  output logic [31:0] frag_count
);
  typedef enum logic [1:0] {G_IDLE, G_BOF, G_BODY, G_EOF} gstate_e;
  gstate_e state;
  logic [15:0] pos, words;
  logic [31:0] l1id;

  always_comb begin
    out_valid = (state != G_IDLE);
    out_word  = '0;
    case (state)
      G_BOF: out_word = '{err: 1'b0, ctrl: 1'b1, data: {CTRL_BOF, 16'h0000}};
      G_EOF: out_word = '{err: 1'b0, ctrl: 1'b1, data: {CTRL_EOF, 16'h0000}};
      G_BODY: begin
        out_word.ctrl = 1'b0;
        case (pos)
          16'(HDR_W_MARK): out_word.data = HDR_MARKER;
          16'(HDR_W_LEN):  out_word.data = 32'(words);
          16'(HDR_W_RUN):  out_word.data = cfg_run;
          16'(HDR_W_L1ID): out_word.data = l1id;
          default:         out_word.data = l1id + 32'(pos);
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= G_IDLE;
      pos <= '0;
      words <= '0;
      l1id <= '0;
      frag_count <= '0;
    end else begin
      if (load) l1id <= cfg_first_l1id;
      case (state)
        G_IDLE: if (enable && !load) begin
          words <= (cfg_words < 16'(HDR_WORDS)) ? 16'(HDR_WORDS) : cfg_words;
          state <= G_BOF;
        end
        G_BOF: if (out_ready) begin
          pos <= '0;
          state <= G_BODY;
        end
        G_BODY: if (out_ready) begin
          pos <= pos + 1'b1;
          if (pos + 1'b1 == words) state <= G_EOF;
        end
        G_EOF: if (out_ready) begin
          l1id <= l1id + 1'b1;
          frag_count <= frag_count + 1'b1;
          state <= G_IDLE;
        end
      endcase
    end
  end
endmodule
