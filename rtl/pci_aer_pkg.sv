// pci_aer_pkg - types and constants shared by the PCI-AER interface.
//
// An address event travels between the host and the board as one 32-bit
// word: the low 16 bits hold the AER address of the pixel, the high 16 bits
// hold a time value. On the output path (host to AER) the time value is the
// delay before the event is sent, counted from the previous event, in ticks
// of the configurable output time base. On the input path (AER to host) it is
// the number of ticks of the input time base since the previous event was
// stored. This word layout follows the published design; the register map of the
// host port below is this design's own choice.
package pci_aer_pkg;

  localparam int unsigned ADDR_W = 16;  // AER address width
  localparam int unsigned TIME_W = 16;  // delay / timestamp field width
  localparam int unsigned WORD_W = ADDR_W + TIME_W;

  typedef struct packed {
    logic [TIME_W-1:0] dt;    // delay (output) or elapsed ticks (input)
    logic [ADDR_W-1:0] addr;  // pixel address
  } aer_word_t;

  // Host register map (word addresses on the bridge's local bus).
  localparam int unsigned REG_AW = 4;
  typedef enum logic [REG_AW-1:0] {
    REG_CTRL    = 4'h0,  // [0] ENOF, [1] input enable, [2] interrupt enable
    REG_OUT_DIV = 4'h1,  // output time base: tick every OUT_DIV+1 clocks
    REG_IN_DIV  = 4'h2,  // input time base:  tick every IN_DIV+1 clocks
    REG_IRQ_THR = 4'h3,  // IFIFO level at which the interrupt is raised
    REG_LEVELS  = 4'h4,  // RO: [31:16] IFIFO level, [15:0] OFIFO level
    REG_FLAGS   = 4'h5,  // status flags, sticky bits cleared by writing 1
    REG_OFIFO   = 4'h6,  // WO: push one event word into the OFIFO
    REG_IFIFO   = 4'h7,  // RO: pop one event word from the IFIFO
    REG_LATE    = 4'h8   // RO: number of events the output sent late
  } reg_addr_e;

  // Bits of REG_FLAGS.
  localparam int unsigned FLAG_OFIFO_EMPTY = 0;
  localparam int unsigned FLAG_OFIFO_FULL  = 1;
  localparam int unsigned FLAG_IFIFO_EMPTY = 2;
  localparam int unsigned FLAG_IFIFO_FULL  = 3;
  localparam int unsigned FLAG_IRQ         = 4;
  localparam int unsigned FLAG_OFIFO_OVF   = 5;  // sticky: write while full
  localparam int unsigned FLAG_IFIFO_UNF   = 6;  // sticky: read while empty
  localparam int unsigned FLAG_IN_STALL    = 7;  // sticky: AER-IN held off by full IFIFO
  localparam int unsigned FLAG_TS_SAT      = 8;  // sticky: a timestamp saturated

endpackage
