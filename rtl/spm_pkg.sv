// spm_pkg: sizes and types shared by the 16x16 serial-parallel multiplier.
//
// The serial operand is cut into ROWS sections of SPM_NIB bits; each
// section is multiplied by the SPM_W_B-bit parallel operand in its own CASA
// row, which yields a SPM_W_B + SPM_NIB bit partial product after
// SPM_CYCLES = SPM_W_B + SPM_NIB clock cycles. The sizes (16-bit operands,
// 4-bit sections, 20 cycles) are those of the published design; the type
// definitions are this design's own.
package spm_pkg;

  localparam int unsigned SPM_W_B    = 16;                  // parallel operand width
  localparam int unsigned SPM_NIB    = 4;                   // bits per serial section
  localparam int unsigned ROWS       = 4;                   // serial sections / CASA rows
  localparam int unsigned SPM_CYCLES = SPM_W_B + SPM_NIB;   // cycles per multiplication

  // Function of the two-input gate cell.
  typedef enum logic {
    GATE_AND = 1'b0,
    GATE_OR  = 1'b1
  } gate_op_e;

  // Sequencer state.
  typedef enum logic {
    ST_IDLE = 1'b0,
    ST_RUN  = 1'b1
  } spm_state_e;

endpackage
