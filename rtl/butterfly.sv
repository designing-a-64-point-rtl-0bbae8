// butterfly: pipelined radix-2 decimation-in-frequency butterfly
//   sum  = (a + b) / 2
//   diff = ((a - b) / 2) * W64^e,  e = 8*csdb2 + csdb1, 0..31
//
// There is no general complex multiplier. The twiddle factor is split as
// W64^e = W64^(e mod 8) * W64^(8*(e div 8)) and applied by two banks of
// constant multipliers (scm) in series, each followed by a multiplexer:
//   stage 1, select csdb1 (3 bits): wire, W64^1 .. W64^7
//   stage 2, select csdb2 (2 bits): wire, W64^8, W64^16 (= -j), W64^24
// Both outputs are halved; over the six levels of a 64-point transform this
// scales the result by 1/64. With WIDE_SUM = 1 (default) the sum and the
// difference are formed on 17 bits before halving, so no butterfly can
// overflow. WIDE_SUM = 0 gives 16-bit adders whose carry out is dropped
// before the halving: that wraps when |a +- b| exceeds 16 bits, and is the
// arithmetic the originally published example run exhibits.
//
// Timing: operands and selects are taken when in_valid is high; register
// stage 1 follows the adders, register stage 2 follows the first multiplier
// bank, and the second multiplier bank drives the outputs combinationally.
// out_valid, sum and diff_w therefore belong to the operands presented
// BF_LAT = 2 cycles earlier; one butterfly can start every cycle.
// The adder / CSD-bank / CSD-bank arrangement, the two select widths and the
// 0.5 scaling follow the processor description; carrying the selects down the
// pipeline with the data, the halving by arithmetic shift (truncation) and
// saturation after each multiplier are this design's choices.
module butterfly
  import fft_pkg::*;
#(
  parameter bit WIDE_SUM = 1'b1   // 1: 17-bit sum before halving, 0: 16-bit adder
) (
  input  logic       clk,
  input  logic       rst,       // synchronous, active high
  input  logic       in_valid,
  input  cplx_t      a,
  input  cplx_t      b,
  input  logic [2:0] csdb1,     // e mod 8
  input  logic [1:0] csdb2,     // e div 8
  output logic       out_valid,
  output cplx_t      sum,       // (a+b)/2
  output cplx_t      diff_w     // ((a-b)/2) * W64^e
);

  // ---- adders ------------------------------------------------------------
  logic signed [DATA_W:0] add_re, add_im, sub_re, sub_im;
  cplx_t add_h, sub_h;

  always_comb begin
    add_re   = {a.re[DATA_W-1], a.re} + {b.re[DATA_W-1], b.re};
    add_im   = {a.im[DATA_W-1], a.im} + {b.im[DATA_W-1], b.im};
    sub_re   = {a.re[DATA_W-1], a.re} - {b.re[DATA_W-1], b.re};
    sub_im   = {a.im[DATA_W-1], a.im} - {b.im[DATA_W-1], b.im};
    if (!WIDE_SUM) begin
      // 16-bit adders: the carry out is lost and bit 15 is taken as the sign
      add_re[DATA_W] = add_re[DATA_W-1];
      add_im[DATA_W] = add_im[DATA_W-1];
      sub_re[DATA_W] = sub_re[DATA_W-1];
      sub_im[DATA_W] = sub_im[DATA_W-1];
    end
    add_h.re = add_re[DATA_W:1];
    add_h.im = add_im[DATA_W:1];
    sub_h.re = sub_re[DATA_W:1];
    sub_h.im = sub_im[DATA_W:1];
  end

  // ---- register stage 1 --------------------------------------------------
  logic       s1_valid;
  cplx_t      s1_sum, s1_diff;
  logic [2:0] s1_csdb1;
  logic [1:0] s1_csdb2;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s1_sum   <= '0;
      s1_diff  <= '0;
      s1_csdb1 <= '0;
      s1_csdb2 <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_sum   <= add_h;
      s1_diff  <= sub_h;
      s1_csdb1 <= csdb1;
      s1_csdb2 <= csdb2;
    end
  end

  // ---- CSD bank 1: W64^0 .. W64^7 ------------------------------------------
  cplx_t bank1 [8];
  assign bank1[0] = s1_diff;
  for (genvar k = 1; k < 8; k++) begin : g_csd1
    scm #(.E(k)) u_scm (.x(s1_diff), .y(bank1[k]));
  end

  // ---- register stage 2 --------------------------------------------------
  logic       s2_valid;
  cplx_t      s2_sum, s2_prod;
  logic [1:0] s2_csdb2;

  always_ff @(posedge clk) begin
    if (rst) begin
      s2_valid <= 1'b0;
      s2_sum   <= '0;
      s2_prod  <= '0;
      s2_csdb2 <= '0;
    end else begin
      s2_valid <= s1_valid;
      s2_sum   <= s1_sum;
      s2_prod  <= bank1[s1_csdb1];
      s2_csdb2 <= s1_csdb2;
    end
  end

  // ---- CSD bank 2: W64^0, W64^8, W64^16, W64^24 -----------------------------
  cplx_t bank2 [4];
  assign bank2[0] = s2_prod;
  for (genvar k = 1; k < 4; k++) begin : g_csd2
    scm #(.E(8 * k)) u_scm (.x(s2_prod), .y(bank2[k]));
  end

  assign out_valid = s2_valid;
  assign sum       = s2_sum;
  assign diff_w    = bank2[s2_csdb2];

endmodule
