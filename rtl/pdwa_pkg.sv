// pdwa_pkg: constants shared by the Pseudo-DWA element selection logic.
//
// The feedback DAC has M = 2**CODE_W - 1 unit elements, driven by a
// thermometer code of M digits. The quantizer output code y(n) and the index
// pointer are CODE_W bits wide. Because M is one less than a power of two, the
// pointer update modulo M is an adder with an end-around carry, and a pointer
// value of M (all ones) is a second spelling of zero. The defaults (5 bits,
// 31 elements, an LSB inversion every 128 cycles) are those of the 5-bit
// quantizer / 31-element DAC modulator this logic was designed for.
package pdwa_pkg;
  parameter int unsigned CODE_W = 5;                 // quantizer / pointer width
  parameter int unsigned M      = (1 << CODE_W) - 1; // DAC unit elements
  parameter int unsigned N_INV  = 128;               // cycles between LSB inversions
endpackage
