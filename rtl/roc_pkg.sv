// roc_pkg: types and constants shared by the ROC chip digital interface.
//
// The slow-control (SC) word of one chip is a packed struct whose bit 0 is
// the first flip-flop of the SC shift register (the one next to the input
// pad), so the bit shifted in last lands in bit 0.  The field list is this
// design's own choice: the bypass switches, the removable buffers and the
// POD controls are set "by SC" in the original description, but their bit
// positions are not given.  The readout frame follows the usual ROC layout
// (chip ID, bunch-crossing ID, 64 channels x 2 discriminator bits), which
// makes 127 frames of 160 bits take about 4 ms at 5 MHz.
package roc_pkg;

  // Memory: 7-bit address pointer, 128 locations, 127 usable, so that a
  // full memory never wraps the write pointer back to the empty value.
  localparam int unsigned MEM_ADDR_W = 7;
  localparam int unsigned MEM_FRAMES = 127;

  localparam int unsigned CHIPID_W = 8;
  localparam int unsigned BCID_W   = 24;
  localparam int unsigned HIT_W    = 128;   // 64 channels x 2 discriminators
  localparam int unsigned FRAME_W  = CHIPID_W + BCID_W + HIT_W;  // 160

  localparam int unsigned ADC_BITS = 12;    // conversion: 2**12 fast clocks

  // SC word (17 bits).  Declared MSB first.
  typedef struct packed {
    logic [CHIPID_W-1:0] chip_id;      // [16:9]
    logic                tx_buf1_en;   // [8] extra TransmitOn buffer
    logic                tx_buf0_en;   // [7] TransmitOn buffer
    logic                data_buf1_en; // [6] extra Data buffer
    logic                data_buf0_en; // [5] Data buffer
    logic                ro_out_byp;   // [4] send EndReadOut on ERO-B
    logic                ro_in_byp;    // [3] take StartReadOut from SRO-B
    logic                ro_self_byp;  // [2] chip bypasses itself
    logic                pod_ext_sro;  // [1] use StartReadOut pad directly
    logic                pod_enable;   // [0] POD readout clock control on
  } sc_cfg_t;

  localparam int unsigned SC_W = $bits(sc_cfg_t);

  // Power-up content of the SC register: POD enabled, first Data and
  // TransmitOn buffers connected, no bypass, chip ID 0.
  localparam logic [SC_W-1:0] SC_DEFAULT = SC_W'('h000A1);

  // Probe register: selects analog probe points; width not given.
  localparam int unsigned PROBE_W = 8;

  // Position of a PCB slow-control jumper.
  typedef enum logic [1:0] {
    JMP_NORMAL  = 2'd0,  // chip N reads chip N-1
    JMP_BYPASS  = 2'd1,  // chip N reads chip N-2 (chip N-1 skipped)
    JMP_REMOVED = 2'd2   // jumper taken off, input left to its pull-down
  } jumper_t;

endpackage
