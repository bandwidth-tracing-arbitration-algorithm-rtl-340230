// dpa_pkg: constants and types shared by the dynamic-priority-adaptation
// (DPA) communication architecture.
//
// The architecture connects several child communication components, each in
// its own clock domain, to one parent component through mixed-clock FIFOs and
// a single DMA engine. Every FIFO reports its status on the FIFO information
// bus (FIB); the DPA arbiter turns that status into a priority per FIFO and
// the burst length calculator (BLC) turns it into a burst length.
//
// From the source design: the sampling period of 32 cycles, the four
// communication components of the example system, the status quantities
// (fill count c, fill change per sampling period, fail count f).
// Own choices: FIFO depth 256, 32-bit data, one read FIFO and one write FIFO
// per component (eight channels), 8-bit saturating fail counts, 32-bit
// signed priorities.
package dpa_pkg;

  // Number of child communication components and FIFO channels
  // (channel 2k: component k -> parent, channel 2k+1: parent -> component k).
  parameter int unsigned NUM_CC        = 4;
  parameter int unsigned NUM_CH        = 2 * NUM_CC;
  // Default FIFO depth (cells) and the largest depth the status types carry.
  parameter int unsigned DEPTH         = 256;
  parameter int unsigned MAX_DEPTH     = 256;
  // Status sampling period in DMA clock cycles.
  parameter int unsigned SAMPLE_PERIOD = 32;
  // Data width of the FIFOs, the shared bus and the parent port.
  parameter int unsigned DATA_W        = 32;
  // Width of a fail count within one sampling period (saturating).
  parameter int unsigned FAIL_W        = 8;
  // Width of the free-running fail event counter crossed between domains.
  parameter int unsigned FAIL_CNT_W    = 16;
  // Width of a fill count: 0 .. MAX_DEPTH.
  parameter int unsigned CNT_W         = $clog2(MAX_DEPTH) + 1;
  // Width of a priority value (signed).
  parameter int unsigned PRIO_W        = 32;

  typedef logic [CNT_W-1:0]         cnt_t;
  typedef logic signed [CNT_W:0]    dcnt_t;
  typedef logic [FAIL_W-1:0]        fail_t;
  typedef logic signed [PRIO_W-1:0] prio_t;

  // Channel direction seen from the DMA controller.
  typedef enum logic {
    CH_TO_PARENT   = 1'b0,  // component writes, DMA reads ("read FIFO")
    CH_FROM_PARENT = 1'b1   // DMA writes, component reads ("write FIFO")
  } ch_dir_e;

  // One FIFO's record on the FIFO information bus.
  typedef struct packed {
    cnt_t  c;       // current urgency count: filled cells (to-parent) or free cells (from-parent)
    cnt_t  c_last;  // c at the most recent sampling point
    dcnt_t dc;      // c change over the last complete sampling period (fill speed * period)
    fail_t f;       // fails of the component since the most recent sampling point
    fail_t f_prev;  // fails of the component during the last complete sampling period
  } fifo_status_t;

  // Priority equation selector for the arbiter.
  typedef enum logic {
    PRIO_FULL    = 1'b0,  // p = c + f*(c*s + dc*d)
    PRIO_REDUCED = 1'b1   // p = (s+d)*(c*f - c_last*f_prev)
  } prio_mode_e;

endpackage
