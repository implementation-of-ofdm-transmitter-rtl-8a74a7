// ofdm_pkg: sizes, sample types and the 16-QAM constellation shared by the
// OFDM transmitter and receiver.
//
// A sample is a 16-bit two's-complement number. A complex sample packs the
// real part in the upper half and the imaginary part in the lower half. The
// 8-point symbol, the four data sub-carriers and the 32 zero bits on each side
// of the data (two zero bins) are the sizes of the design this RTL implements;
// the cyclic-prefix length (2 samples) and the QAM amplitude unit are choices
// of this implementation.
package ofdm_pkg;

  localparam int unsigned DATA_W = 16;  // bits per real sample
  localparam int unsigned OFDM_N_FFT = 8;   // points of the (I)FFT
  localparam int unsigned OFDM_N_REP = 4;   // sub-carriers that carry the one QAM point
  localparam int unsigned OFDM_N_PAD = 2;   // zero bins on each side of the data
  localparam int unsigned OFDM_N_CP  = 2;   // cyclic-prefix samples

  typedef logic signed [DATA_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Default 16-QAM amplitude unit: levels are +-UNIT and +-3*UNIT.
  localparam int QAM_UNIT = 2048;

  // Gray-coded 16-QAM level for a pair of bits: 00 -> -3, 01 -> -1,
  // 11 -> +1, 10 -> +3 (in units of `unit`).
  function automatic sample_t qam_level(input logic [1:0] b, input int unit);
    unique case (b)
      2'b00:   return sample_t'(-3 * unit);
      2'b01:   return sample_t'(-unit);
      2'b11:   return sample_t'(unit);
      default: return sample_t'(3 * unit);
    endcase
  endfunction

endpackage
