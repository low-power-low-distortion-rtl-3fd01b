// Shared types and constants of the audio delta-sigma DAC.
//
// The converter takes 18-bit PCM at 44.1 kHz, interpolates it by 64 to
// 2.8224 MHz, reduces it to a 15-level code in a third-order modulator and
// drives 15 unit capacitors through a data-weighted-averaging selector.
// The sample width, oversampling ratio, element count and level range below
// are the published design values; CFRAC (coefficient fraction bits) is a
// choice of this implementation.
package dsdac_pkg;
  localparam int unsigned W      = 18;  // PCM and filter word length
  localparam int unsigned OSR    = 64;  // 44.1 kHz -> 2.8224 MHz
  localparam int unsigned N_ELEM = 15;  // unit capacitors / thermometer bits
  localparam int unsigned CW     = 18;  // FIR coefficient word length
  localparam int unsigned CFRAC  = 16;  // fraction bits of the coefficients
  localparam int          QMAX   = 7;   // quantizer levels -QMAX..+QMAX (15)

  typedef logic signed [W-1:0] sample_t;
  typedef logic signed [3:0]   level_t;   // quantizer output, 4 signed bits
  typedef logic [N_ELEM-1:0]   elem_t;    // one bit per unit capacitor
endpackage
