// ccb_pkg -- shared constants and types of the CCB FPGA.
//
// The CCB FPGA sequences the phase switches, calibration noise diodes and
// analog integrators of a two-radiometer receiver, adds up the A/D samples
// of each phase-switch state over an integration, and hands the sums to a
// host computer over PCI.  This package holds what its modules share:
//   * the byte offsets of the PCI-visible registers and their reset values,
//   * the bit positions of the control register,
//   * the configuration that is latched at the start of every integration,
//   * the layout of the block written to host DMA memory per integration.
// Register offsets 0x40-0x68, register widths, reset values and control-bit
// positions follow the CCB register map.  The offsets of the two interrupt
// status registers (0x6C, 0x70) and the DMA word layout (data words first,
// then the overflow mask, then the A/D diagnostics) are this design's choice.
package ccb_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NUM_ADC      = 16;  // A/D converters (2 radiometers x 4 bands x 2 detectors)
  localparam int unsigned NUM_PHS      = 4;   // phase-switch states = integrations per period
  localparam int unsigned NUM_VALUES   = NUM_ADC * NUM_PHS;  // 64 integrated values
  localparam int unsigned MAX_SAMPLES  = 32;  // stages of the phase-switch state machine
  localparam int unsigned ADC_W        = 16;  // A/D sample width
  localparam int unsigned ACC_W        = 32;  // integrated value width

  // ------------------------------------------------ register byte offsets
  localparam logic [7:0] ADDR_CONTROL    = 8'h40;
  localparam logic [7:0] ADDR_SPC        = 8'h44;  // samples-per-cycle
  localparam logic [7:0] ADDR_PHS_A      = 8'h48;  // phase-switch-a
  localparam logic [7:0] ADDR_PHS_B      = 8'h4C;  // phase-switch-b
  localparam logic [7:0] ADDR_CPI        = 8'h50;  // cycles-per-integ
  localparam logic [7:0] ADDR_LONG_DT    = 8'h54;  // long-sample-dt
  localparam logic [7:0] ADDR_SHORT_DT   = 8'h58;  // short-sample-dt
  localparam logic [7:0] ADDR_PHS_DT     = 8'h5C;  // phase-switch-dt
  localparam logic [7:0] ADDR_RESET_DT   = 8'h60;  // analog-reset-dt
  localparam logic [7:0] ADDR_CAL_STATES = 8'h64;  // cal-diode-states
  localparam logic [7:0] ADDR_CAL_DT     = 8'h68;  // cal-diode-dt
  localparam logic [7:0] ADDR_SENT_1PPS  = 8'h6C;  // sent-1pps (offset chosen here)
  localparam logic [7:0] ADDR_SENT_INTEG = 8'h70;  // sent-integ-done (offset chosen here)

  // ------------------------------------------------ control register bits
  localparam int unsigned CTRL_START_SCAN  = 0;
  localparam int unsigned CTRL_WAIT_1PPS   = 1;
  localparam int unsigned CTRL_RESET_FPGA  = 2;
  localparam int unsigned CTRL_IRQ_ENABLE  = 3;
  localparam int unsigned CTRL_DRIVE_PHS_A = 4;
  localparam int unsigned CTRL_DRIVE_PHS_B = 5;
  localparam int unsigned CTRL_DRIVE_CAL_A = 6;
  localparam int unsigned CTRL_DRIVE_CAL_B = 7;
  localparam int unsigned CTRL_BITS        = 8;

  typedef struct packed {
    logic drive_cal_b;
    logic drive_cal_a;
    logic drive_phs_b;
    logic drive_phs_a;
    logic irq_enable;
    logic reset_fpga;
    logic wait_1pps;
    logic start_scan;
  } ctrl_t;  // bit order matches CTRL_* (start_scan is bit 0)

  // ------------------------------------- per-integration configuration
  typedef struct packed {
    logic [5:0]  spc;         // samples-per-cycle, 1-32
    logic [31:0] phs_a;       // phase-switch-a, bit n = state in sample n
    logic [31:0] phs_b;       // phase-switch-b
    logic [15:0] cpi;         // cycles-per-integ, 1-65535
    logic [15:0] long_dt;     // long-sample-dt, 100 ns units
    logic [15:0] short_dt;    // short-sample-dt, 100 ns units
    logic [7:0]  phs_dt;      // phase-switch-dt, 100 ns units
    logic [7:0]  reset_dt;    // analog-reset-dt, 100 ns units
    logic [1:0]  cal_states;  // cal-diode-states, bit 0 = diode A
    logic [31:0] cal_dt;      // cal-diode-dt, 100 ns units
  } cfg_t;

  localparam cfg_t CFG_DEFAULT = '{
    spc:        6'd1,
    phs_a:      32'd0,
    phs_b:      32'd0,
    cpi:        16'd40,
    long_dt:    16'd250,
    short_dt:   16'd250,
    phs_dt:     8'd0,
    reset_dt:   8'd0,
    cal_states: 2'd0,
    cal_dt:     32'd0
  };

  // ------------------------------------------------- DMA block layout
  // 32-bit little-endian words, byte offset = 4 * word index.
  localparam int unsigned DMA_WORD_DATA  = 0;    // 64 integrated values
  localparam int unsigned DMA_WORD_OVF   = 64;   // 2 words of overflow mask
  localparam int unsigned DMA_WORD_DIAG  = 66;   // 8 words, two 16-bit A/D values each
  localparam int unsigned DMA_WORDS      = 74;
  localparam int unsigned DMA_ADDR_W     = 9;    // byte offset width

  // ------------------------------------------------ state encodings
  typedef enum logic [1:0] {
    I_WAIT_SCAN_START = 2'd0,
    I_WAIT_CAL_DIODE  = 2'd1,
    I_INTEGRATE       = 2'd2
  } integ_state_t;

  typedef enum logic [2:0] {
    S_WAIT_INTEG_START = 3'd0,
    S_PHASE_SHIFT      = 3'd1,
    S_SHORT_SAMPLE     = 3'd2,
    S_WAIT_S_RESET     = 3'd3,
    S_LONG_SAMPLE      = 3'd4,
    S_WAIT_L_RESET     = 3'd5
  } sample_state_t;

endpackage
