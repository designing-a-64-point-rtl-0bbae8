// fft_pkg: types and constants shared by the 64-point FFT/IFFT processor.
//
// A complex sample is one 32-bit memory word: the real part in bits 31:16
// and the imaginary part in bits 15:0, both two's complement. The word width
// and the 64-point / radix-8 organisation (eight banks of eight words) follow
// the processor description; the split of the word into real and imaginary
// halves and the fixed-point format of the twiddle factors are this design's
// own choices.
//
// Twiddle factors W64^e = cos(2*pi*e/64) - j*sin(2*pi*e/64) are held as
// integers scaled by 2^TW_FRAC (Q1.14), rounded to nearest. Only the nine
// (cos, sin) pairs for e = 0..8 are stored; every other exponent is reached
// by swapping the two values and choosing signs, as the octant symmetry of
// the unit circle allows:
//   e in  9..16 : cos(e) = sin(16-e), sin(e) = cos(16-e)
//   e in 17..31 : cos(e) = -sin(e-16), sin(e) = cos(e-16)  (W64^16 = -j)
package fft_pkg;

  localparam int unsigned N_POINTS  = 64;  // transform length
  localparam int unsigned RADIX     = 8;   // points per group / banks
  localparam int unsigned N_BANKS   = 8;   // two-port memory banks
  localparam int unsigned BANK_DEPTH = 8;  // words per bank
  localparam int unsigned DATA_W    = 16;  // bits per real or imaginary part
  localparam int unsigned WORD_W    = 2 * DATA_W;
  localparam int unsigned TW_FRAC   = 14;  // fractional bits of a twiddle factor
  localparam int unsigned BF_LAT    = 2;   // butterfly register stages

  typedef logic [2:0] addr_t;   // bank address / index within a group
  typedef logic [2:0] bank_t;   // bank number

  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx_t;

  // round(2^14 * cos(2*pi*k/64)) and round(2^14 * sin(2*pi*k/64)), k = 0..8
  function automatic int tw_cos_base(int k);
    case (k)
      0: return 16384;  1: return 16305;  2: return 16069;
      3: return 15679;  4: return 15137;  5: return 14449;
      6: return 13623;  7: return 12665;  default: return 11585;
    endcase
  endfunction

  function automatic int tw_sin_base(int k);
    case (k)
      0: return 0;      1: return 1606;   2: return 3196;
      3: return 4756;   4: return 6270;   5: return 7723;
      6: return 9102;   7: return 10394;  default: return 11585;
    endcase
  endfunction

  // Scaled cos(2*pi*e/64) for e = 0..31.
  function automatic int tw_cos(int e);
    if (e <= 8)       return tw_cos_base(e);
    else if (e <= 16) return tw_sin_base(16 - e);
    else if (e <= 24) return -tw_sin_base(e - 16);
    else              return -tw_cos_base(32 - e);
  endfunction

  // Scaled sin(2*pi*e/64) for e = 0..31.
  function automatic int tw_sin(int e);
    if (e <= 8)       return tw_sin_base(e);
    else if (e <= 16) return tw_cos_base(16 - e);
    else if (e <= 24) return tw_cos_base(e - 16);
    else              return tw_sin_base(32 - e);
  endfunction

  // Saturate a wide signed value to DATA_W bits.
  function automatic logic signed [DATA_W-1:0] sat(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[DATA_W-1:0];
  endfunction

  // Location of sample n (0..63) in the skewed memory map: row n/8 is the
  // address, and the bank is rotated by the row number, so both a column
  // {l, l+8, .., l+56} and a row {8r, .., 8r+7} lie in eight different banks.
  function automatic bank_t map_bank(input logic [5:0] n);
    return bank_t'(n[2:0] + n[5:3]);
  endfunction

  function automatic addr_t map_addr(input logic [5:0] n);
    return n[5:3];
  endfunction

endpackage
