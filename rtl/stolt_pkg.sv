// stolt_pkg: types and helpers shared by the fixed-point plane-wave Stolt
// migration datapath.
//
// Every data value in the datapath is a signed two's-complement fixed-point
// number kept inside [-1, +1]; a separate unsigned scaling factor s records
// that the true value is (stored value) * 2^s. Equalising two values means
// shifting the one with the smaller factor right by the difference, which is
// what sra_round() does: an arithmetic right shift that rounds to nearest
// (half up) and saturates the shift distance, so that very large differences
// give 0, never garbage. Every scaling shift of the datapath uses it. Plain
// truncation would leave a constant -1/2 LSB bias on every element; after the
// spatial inverse FFT such a bias piles up on channel 0 as a visible artefact.
//
// Word formats follow the document's fixed-point table: samples P, spectra F
// and K are Q1.14 in 16 bits, the remap position M is unsigned Q12.12 in 24
// bits, the scaler A is Q1.14, the phase increment R is Q3.12 in units of pi,
// and the compounded frame C and output H are Q1.22 in 24 bits.
package stolt_pkg;

  // Scaling factor (power-of-two exponent). The document stores these as int8.
  typedef logic [7:0] scale_t;

  localparam int unsigned DATA_W  = 16;  // P, F, K, A
  localparam int unsigned DATA_FR = 14;
  localparam int unsigned ACC_W   = 24;  // C, H
  localparam int unsigned ACC_FR  = 22;
  localparam int unsigned MAP_W   = 24;  // M: unsigned Q12.12
  localparam int unsigned MAP_FR  = 12;
  localparam int unsigned PH_W    = 16;  // R: signed Q3.12, units of pi
  localparam int unsigned PH_FR   = 12;
  localparam int unsigned TW_FR   = 14;  // FFT twiddle factors Q1.14

  // Arithmetic right shift, rounded to nearest, distance clamped to the word.
  function automatic logic signed [47:0] sra_round(input logic signed [47:0] v,
                                                   input int unsigned sh);
    if (sh == 0) return v;
    if (sh > 46) return 48'sd0;
    return (v + (48'sd1 <<< (sh - 1))) >>> sh;
  endfunction

  // Reverse the low 'bits' bits of v.
  function automatic logic [31:0] bitrev(input logic [31:0] v, input int unsigned bits);
    logic [31:0] r;
    r = '0;
    for (int unsigned i = 0; i < bits; i++) r[bits-1-i] = v[i];
    return r;
  endfunction

  function automatic scale_t max_scale(input scale_t a, input scale_t b);
    return (a > b) ? a : b;
  endfunction

endpackage
