// das_pkg: types and constants shared by the data acquisition crate.
//
// The system runs from one global 10 MHz clock, so one clock cycle is one
// 100 ns time-of-flight tick. An event leaves a TOF module as a 32-bit word:
// the upper 16 bits are the block offset (which histogram), the lower 16 bits
// the histogram offset (which channel of it). The IOC configures the modules
// through a single write request, cfg_req_t; its layout (slot, target,
// detector, index, data) is this design's own, since the backplane register
// map is not specified.
package das_pkg;

  localparam int unsigned CLK_HZ          = 10_000_000; // global TOF clock
  localparam int unsigned TIME_W          = 20;         // time counter width
  localparam int unsigned HIST_W          = 16;         // histogram offset width
  localparam int unsigned BLOCK_W         = 16;         // block offset width
  localparam int unsigned ADC_W           = 8;          // SIMM peak ADC width
  localparam int unsigned LLD_W           = 12;         // LLD DAC width
  localparam int unsigned WORD_W          = 32;         // FIFO / VXI data word
  localparam int unsigned DET_PER_CHANNEL = 2;          // detectors per SIMM / FPGA
  localparam int unsigned N_CHANNELS      = 8;          // SIMMs per TOF module
  localparam int unsigned N_DET           = DET_PER_CHANNEL * N_CHANNELS;
  localparam int unsigned MAX_TOF         = 11;         // TOF modules per mainframe
  localparam int unsigned FIFO_DEPTH      = 2048;       // each half of the ping-pong
  localparam int unsigned N_TEST          = 3;          // ROC test inputs
  localparam int unsigned SLOT_W          = 4;
  localparam int unsigned DET_W           = 4;

  typedef struct packed {
    logic [BLOCK_W-1:0] block_off;
    logic [HIST_W-1:0]  hist_off;
  } event_word_t;

  // Where a detector's event trigger comes from.
  typedef enum logic [1:0] {
    SRC_DETECTOR = 2'd0,
    SRC_TEST0    = 2'd1,
    SRC_TEST1    = 2'd2,
    SRC_TEST2    = 2'd3
  } input_src_e;

  // Per-detector settings held in the TOF module's register bank.
  typedef struct packed {
    logic [BLOCK_W-1:0] block_off;
    logic [ADC_W-1:0]   uld;        // upper level threshold, digital compare
    logic [LLD_W-1:0]   lld;        // code for the LLD DAC
    input_src_e         src;
    logic               ph_mode;    // pulse-height measurement switch
    logic               enable;
  } det_cfg_t;

  // What an IOC configuration write targets.
  typedef enum logic [2:0] {
    CFG_BLOCK_OFF = 3'd0,
    CFG_ULD       = 3'd1,
    CFG_LLD       = 3'd2,
    CFG_CTRL      = 3'd3,  // data[0] enable, data[1] ph_mode, data[3:2] src
    CFG_SWTRIG    = 3'd4,  // software-driven detector input
    CFG_LUT       = 3'd5   // time lookup table entry, index = time
  } cfg_sel_e;

  typedef struct packed {
    logic              we;
    logic [SLOT_W-1:0] slot;
    cfg_sel_e          sel;
    logic [DET_W-1:0]  det;
    logic [TIME_W-1:0] index;
    logic [HIST_W-1:0] data;
  } cfg_req_t;

  // One-cycle event flags a TOF module reports, one bit per kind of event.
  typedef struct packed {
    logic accepted;     // an event word entered the fill FIFO
    logic uld_veto;     // an event was rejected by the upper level compare
    logic dead;         // a trigger arrived while its detector was busy
    logic out_of_gate;  // a trigger arrived outside the time window
    logic adc_timeout;  // the SIMM sent no ADC value in time
    logic overflow;     // an event was lost to a full fill FIFO
    logic vetoed;       // an event was discarded because of the system veto
    logic unread_lost;  // words left unread at T0 were discarded
  } tof_status_t;

endpackage
