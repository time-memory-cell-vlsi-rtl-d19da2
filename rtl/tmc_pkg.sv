// tmc_pkg: sizes, code formats and register addresses shared by the TMC-TEG5
// pipeline TDC blocks.
//
// The time digitizer samples its input at 32 equally spaced phases of each
// clock period. The 32 samples are split into two halves of 16; each half is
// encoded into a 6-bit code and the two codes form the 12-bit word that is
// stored every clock in the 256-word ring buffer (dual-port memory).
// The 32 phases, the 16-bit encoder halves, the 6-bit codes, the 12-bit memory
// word, the 256-word memory, the 128-word readout FIFO, the 8-bit x 5-word
// trigger FIFO and the eight 8-bit CSRs follow the chip's block diagram. The
// bit layout of a code (hit tag, edge polarity, 4-bit position) and the
// register map are this design's own choices.
package tmc_pkg;

  // Time samples per clock period (taps of the asymmetric ring oscillator).
  localparam int unsigned NTAPS      = 32;
  // Samples covered by one encoder.
  localparam int unsigned ENC_BITS   = 16;
  localparam int unsigned POS_W      = $clog2(ENC_BITS);
  // Width of one encoder code and of a memory word.
  localparam int unsigned CODE_W     = 6;
  localparam int unsigned WORD_W     = 2 * CODE_W;
  // Event number counter width (fills one 12-bit output word).
  localparam int unsigned EVNO_W     = 12;
  // CSR bus.
  localparam int unsigned CSR_W      = 8;
  localparam int unsigned CSR_AW     = 3;

  typedef logic [WORD_W-1:0] word_t;

  // One encoder code: hit tag, polarity of the first edge (1 = rising,
  // 0 = falling) and the index of the first sample after that edge.
  typedef struct packed {
    logic             hit;
    logic             rise;
    logic [POS_W-1:0] pos;
  } code_t;

  // Register addresses (RA0-2).
  typedef enum logic [CSR_AW-1:0] {
    CSR_OFFSET  = 3'd0,  // CSR0: trigger offset (rw)
    CSR_RPTR    = 3'd1,  // CSR1: read pointer (r)
    CSR_STATUS  = 3'd2,  // CSR2: run and FIFO status (r)
    CSR_WPTR    = 3'd3,  // CSR3: write pointer (r)
    CSR_WCOUNT  = 3'd4,  // CSR4: words read out per event (rw)
    CSR_EVNO    = 3'd5,  // CSR5: event number, low 8 bits (r)
    CSR_ERRMASK = 3'd6,  // CSR6: error enable mask (rw)
    CSR_ERRFLAG = 3'd7   // CSR7: error flags (r, write 1 to clear)
  } csr_addr_e;

  // Error flag bits of CSR7.
  localparam int unsigned ERR_TFIFO_OVF = 0;  // trigger with trigger FIFO full
  localparam int unsigned ERR_TRIG_IDLE = 1;  // trigger while writing is stopped
  localparam int unsigned NERR          = 2;

endpackage
