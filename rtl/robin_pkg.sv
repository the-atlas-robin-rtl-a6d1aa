// robin_pkg: types and constants shared by the ROBIN FPGA logic.
//
// The ROBIN buffers event fragments arriving on three read-out links (ROLs)
// in paged buffer memories and returns them on request over PCI or Gigabit
// Ethernet. This package fixes the word formats that travel between the
// blocks: the link word (a 32-bit S-Link word with a control flag), the four
// word Used-Page-FIFO record (page info, L1ID, status, run number, in that
// order, as the design specifies), the status bits, and the buffer memory
// request. Sizes that the design states (three links, 1k-entry free page
// FIFO, 256-record used page FIFO, 256-word data FIFO, 2 kWord message
// memory, 32-entry message FIFO, 512-word DMA FIFO, 64 MB buffer per link)
// are given here as defaults; the control-word codes, the fragment header
// layout and the status bit positions are this implementation's own choice.
package robin_pkg;

  localparam int unsigned NUM_ROL        = 3;
  localparam int unsigned BUF_AW         = 24;    // 64 MB / 4 bytes = 16M words
  localparam int unsigned PAGE_NUM_W     = 16;    // up to 64k pages (1 kB pages)
  localparam int unsigned PAGE_LEN_W     = 16;    // up to 32k words (128 kB page)
  localparam int unsigned FPF_DEPTH      = 1024;
  localparam int unsigned UPF_DEPTH      = 256;
  localparam int unsigned DATA_FIFO_DEPTH= 256;
  localparam int unsigned MSG_DPR_WORDS  = 2048;
  localparam int unsigned MSG_FIFO_DEPTH = 32;
  localparam int unsigned DMA_FIFO_DEPTH = 512;

  // S-Link control words (begin / end of fragment); low 16 bits are free.
  localparam logic [15:0] CTRL_BOF = 16'hB0F0;
  localparam logic [15:0] CTRL_EOF = 16'hE0F0;

  // Fragment header layout (word offsets after the begin-of-fragment word).
  localparam logic [31:0] HDR_MARKER  = 32'hEE1234EE;
  localparam int unsigned HDR_W_MARK  = 0;
  localparam int unsigned HDR_W_LEN   = 1;   // total fragment length in words
  localparam int unsigned HDR_W_RUN   = 2;   // run number
  localparam int unsigned HDR_W_L1ID  = 3;   // extended L1ID
  localparam int unsigned HDR_WORDS   = 4;

  typedef struct packed {
    logic        err;    // 1: a link error was seen just before this word
    logic        ctrl;   // 1: S-Link control word
    logic [31:0] data;
  } link_word_t;

  // Status word of a UPF record.
  typedef struct packed {
    logic [22:0] reserved;
    logic        link_error;    // bit 8: link transmission error in fragment
    logic        crc_appended;  // bit 7: last word of the page is the CRC
    logic        no_l1id;       // bit 6: fragment ended before the L1ID word
    logic        bad_marker;    // bit 5: header marker wrong (format error)
    logic        len_mismatch;  // bit 4: header length differs from count
    logic        truncated;     // bit 3: new BOF seen before EOF
    logic        ctrl_error;    // bit 2: unknown control word inside fragment
    logic        last_page;     // bit 1
    logic        first_page;    // bit 0
  } page_status_t;

  typedef struct packed {
    logic [31:0]  run_number;
    page_status_t status;
    logic [31:0]  l1id;
    logic [PAGE_NUM_W-1:0] page_num;   // page info: page number ...
    logic [PAGE_LEN_W-1:0] page_len;   // ... and words written into it
  } upf_record_t;

  typedef enum logic [1:0] {
    RD_PCI = 2'd0,
    RD_GBE = 2'd1,
    RD_CPU = 2'd2
  } reader_e;

endpackage
