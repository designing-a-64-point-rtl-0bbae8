// scm: single-constant complex multiplier, y = x * W64^E, built from shifts
// and adds only.
//
// The twiddle factor W64^E = C - jS (C, S scaled by 2^14, see fft_pkg) is
// fixed by the parameter, so
//   y.re = (x.re*C + x.im*S) >>> 14
//   y.im = (x.im*C - x.re*S) >>> 14
// Each of C and S is recoded at elaboration into canonical signed digits
// (CSD: digits in {-1, 0, +1}, no two adjacent non-zero), and each product is
// the sum or difference of shifted copies of the input, one per non-zero digit.
// The product sums are exact; the result is truncated (rounded toward minus
// infinity) by the final shift and saturated to 16 bits.
//
// Replacing the complex multiplier by CSD shift-and-add constant multipliers
// is the processor's central idea; the Q1.14 constants, truncation and
// saturation are this design's choices.
//
// Interface: x, y are cplx_t. Purely combinational, no clock.
module scm
  import fft_pkg::*;
#(
  parameter int unsigned E = 1   // exponent of W64, 0..31
) (
  input  cplx_t x,
  output cplx_t y
);

  localparam int CONST_C = tw_cos(int'(E));
  localparam int CONST_S = tw_sin(int'(E));
  localparam int DW      = 17;   // digits needed for |K| <= 2^14

  // CSD recoding of k: returns the positive digit mask (neg = 0) or the
  // negative digit mask (neg = 1).
  function automatic logic [DW-1:0] csd_mask(int k, bit neg);
    logic [DW-1:0] pos_m, neg_m;
    int            r;
    pos_m = '0;
    neg_m = '0;
    r     = (k < 0) ? -k : k;
    for (int i = 0; i < DW; i++) begin
      if (r % 2 != 0) begin
        if (r % 4 == 3) begin   // digit -1, carry into the next position
          neg_m[i] = 1'b1;
          r        = r + 1;
        end else begin          // digit +1
          pos_m[i] = 1'b1;
          r        = r - 1;
        end
      end
      r = r / 2;
    end
    if (k < 0) return neg ? pos_m : neg_m;
    else       return neg ? neg_m : pos_m;
  endfunction

  localparam logic [DW-1:0] C_POS = csd_mask(CONST_C, 1'b0);
  localparam logic [DW-1:0] C_NEG = csd_mask(CONST_C, 1'b1);
  localparam logic [DW-1:0] S_POS = csd_mask(CONST_S, 1'b0);
  localparam logic [DW-1:0] S_NEG = csd_mask(CONST_S, 1'b1);

  // Sum of shifted copies of v selected by the digit masks.
  function automatic logic signed [47:0] shift_add(input logic signed [DATA_W-1:0] v,
                                                   input logic [DW-1:0] pm,
                                                   input logic [DW-1:0] nm);
    logic signed [47:0] acc, vx;
    acc = '0;
    vx  = 48'(v);
    for (int i = 0; i < DW; i++) begin
      if (pm[i]) acc = acc + (vx <<< i);
      if (nm[i]) acc = acc - (vx <<< i);
    end
    return acc;
  endfunction

  logic signed [47:0] re_c, re_s, im_c, im_s, re_sum, im_sum;

  always_comb begin
    re_c   = shift_add(x.re, C_POS, C_NEG);
    re_s   = shift_add(x.re, S_POS, S_NEG);
    im_c   = shift_add(x.im, C_POS, C_NEG);
    im_s   = shift_add(x.im, S_POS, S_NEG);
    re_sum = re_c + im_s;
    im_sum = im_c - re_s;
    y.re   = sat(re_sum >>> TW_FRAC);
    y.im   = sat(im_sum >>> TW_FRAC);
  end

endmodule
