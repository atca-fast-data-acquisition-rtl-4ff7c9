// Shared types and constants of the TRP acquisition block.
//
// A TRP acquisition block is one FPGA that digitises four ADC channels at the
// sample clock and stores and/or streams the data over one PCIe x1 link. This
// package holds the operating-mode encodings, the 44-bit time stamp width and
// the layouts of the words the data paths produce:
//   * a 64-bit processed event (energy value with time stamp), the unit that is
//     streamed to the host,
//   * the 128-bit words written to the DDR2 memory (raw samples, segment
//     headers, processed event records).
// The 44-bit time stamp, the 16-bit sample container, the 128-bit DDR2 word and
// the 64-bit streamed energy word follow the document; the bit positions of the
// fields inside those words are this design's own choice.
package trp_pkg;

  localparam int TS_BITS     = 44;   // time stamp width
  localparam int SAMPLE_W    = 16;   // sample container (ADC value in the MSBs)
  localparam int ENERGY_W    = 16;   // processed energy value width
  localparam int STORE_W     = 128;  // DDR2 word
  localparam int STREAM_W    = 64;   // streamed energy word

  typedef logic [TS_BITS-1:0] ts_t;

  // What a task does between START and its end.
  typedef enum logic [1:0] {
    OP_STORE      = 2'd0,  // store in DDR2, retrieve when acquisition ends
    OP_STREAM     = 2'd1,  // stream processed energies only
    OP_CONCURRENT = 2'd2   // raw data to DDR2 and energies streamed in parallel
  } op_mode_e;

  // Which data path feeds the DDR2 memory in OP_STORE.
  typedef enum logic [1:0] {
    DM_RAW  = 2'd0,
    DM_SEG  = 2'd1,
    DM_PROC = 2'd2,
    DM_CAL  = 2'd3
  } data_mode_e;

  // Record type codes carried in the top nibble of non-raw DDR2 words.
  localparam logic [3:0] REC_SEG_HDR = 4'h5;
  localparam logic [3:0] REC_PROC    = 4'h3;

  // Streamed processed event (64 bits). valid is always 1 so that an all-zero
  // word marks padding at the end of a DMA packet.
  typedef struct packed {
    logic [1:0]          ch;
    logic                pileup;
    logic                valid;
    ts_t                 ts;
    logic [ENERGY_W-1:0] energy;
  } event_t;

  // Header of a stored pulse segment (128 bits); the samples follow, 8 per word.
  typedef struct packed {
    logic [3:0]  rec;      // REC_SEG_HDR
    logic [1:0]  ch;
    logic [15:0] width;    // samples in the segment
    logic [15:0] pre;      // of which before the trigger
    logic [5:0]  rsvd;
    logic [39:0] seq;      // segment number since START
    ts_t         ts;       // time stamp of the trigger
  } seg_hdr_t;

  // Processed event record as stored in DDR2 (one event per 128-bit word).
  typedef struct packed {
    logic [3:0]  rec;      // REC_PROC
    logic [59:0] rsvd;
    event_t      ev;
  } proc_rec_t;

  // Operational error codes of the time-stamped error log.
  localparam logic [3:0] ERR_STORE_OVF  = 4'h1;
  localparam logic [3:0] ERR_STREAM_OVF = 4'h2;

endpackage
