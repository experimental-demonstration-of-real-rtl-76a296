// Shared constants and types of the FDM QPSK receiver.
//
// The receiver samples I and Q at 1 GS/s with 10-bit converters and processes
// four samples of each per 250 MHz FPGA cycle. Symbols are QPSK at 500 MBd, so
// an equalizer working at T/2 (two samples per symbol) sees two symbols per
// cycle. These numbers follow the receiver description; the symbol encoding
// and the shift-command type are this design's own choices.
package fdm_rx_pkg;

  localparam int unsigned ADC_BITS = 10;  // converter resolution
  localparam int unsigned SAMPLES_PER_CYCLE = 4;  // samples per FPGA cycle (1 GS/s / 250 MHz)
  localparam int unsigned EQ_TAPS = 11;  // T/2 equalizer length

  // Center-tap tracking command. LEFT moves every coefficient two taps
  // towards index 0 and costs one extra output symbol; RIGHT moves them two
  // taps towards the last index and removes one redundant symbol.
  typedef enum logic [1:0] {
    SH_NONE  = 2'd0,
    SH_LEFT  = 2'd1,
    SH_RIGHT = 2'd2
  } shift_e;

  // QPSK hard decision: bit 0 is set when I is negative, bit 1 when Q is
  // negative (Gray mapping, one bit per quadrature).
  typedef logic [1:0] qpsk_sym_t;

endpackage
