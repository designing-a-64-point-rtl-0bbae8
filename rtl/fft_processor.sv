// fft_processor: 64-point FFT engine working in place on eight two-port
// memory banks.
//
// It computes X(k) = sum_n x(n) W64^(nk) / 64 by radix-2 decimation in
// frequency (six levels), grouped as two radix-8 passes: pass 0 works on the
// columns {g, g+8, .., g+56}, pass 1 on the rows {8g, .., 8g+7}. A group of
// eight samples is fetched from the eight banks in one cycle into a register
// bank, the three butterfly levels of that group run on the register bank,
// and the group is written back to the same places. Two register banks hold
// two groups whose butterflies are interleaved so that the single pipelined
// butterfly issues one operation per cycle. Every butterfly halves its
// outputs, so the result is the DFT divided by 64, and it is left in
// bit-reversed order: position p holds X(bitrev6(p)).
//
// Blocks: mcsm (control), agu (bank addresses), register_bank x2, butterfly,
// plus the two crossbars that rotate a group between bank order and group
// order (group element q <-> bank (g+q) mod 8).
//
// Memory interface (one port set per bank, names as on the processor's
// signal trace): read_add[b] / read_data[b] with combinational read,
// write_add[b] / write_data[b] with one common write enable memwrite.
// en_fft starts (or restarts) a transform; the transform takes 196 cycles,
// done_fft rises on the next edge (197 cycles after en_fft) and stays high
// until the next start; busy is high in between. bypass marks the one load
// that forwards a sample from register bank 2 (see mcsm).
module fft_processor
  import fft_pkg::*;
#(
  parameter bit WIDE_SUM = 1'b1   // butterfly adder width, see butterfly
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en_fft,
  output logic  done_fft,
  output logic  busy,
  output addr_t read_add   [N_BANKS],
  input  cplx_t read_data  [N_BANKS],
  output addr_t write_add  [N_BANKS],
  output cplx_t write_data [N_BANKS],
  output logic  memwrite,
  output logic  bypass
);

  // ---- control ----------------------------------------------------------------
  logic       mem_load, load_sel, mem_store, store_sel;
  logic       issue, in_sel, wb_valid, wb_sel;
  addr_t      rs1, rs2, wb_idx1, wb_idx2;
  logic [2:0] csdb1;
  logic [1:0] csdb2;

  mcsm u_mcsm (
    .clk, .rst, .en_fft, .busy, .done_fft,
    .mem_load, .load_sel, .mem_store, .store_sel,
    .issue, .in_sel, .rs1, .rs2, .csdb1, .csdb2,
    .wb_valid, .wb_sel, .wb_idx1, .wb_idx2, .bypass
  );

  // ---- addresses ----------------------------------------------------------------
  addr_t rd_group, wr_group;
  logic  rd_pass, wr_pass;

  agu u_agu (
    .clk, .rst, .clear(en_fft),
    .rd_step(mem_load), .wr_step(mem_store),
    .read_add, .write_add, .rd_group, .wr_group, .rd_pass, .wr_pass
  );

  // ---- load crossbar: group element q comes from bank (g + q) mod 8 ----------
  // At the pass boundary the first row's element 7 (sample 7) is not yet in
  // memory; it is taken from register 0 of register bank 2 instead.
  cplx_t load_data [RADIX];
  cplx_t rb_regs [2][RADIX];
  always_comb begin
    for (int q = 0; q < RADIX; q++)
      load_data[q] = read_data[addr_t'(q[2:0] + rd_group)];
    if (bypass) load_data[RADIX-1] = rb_regs[1][0];
  end

  // ---- register banks 1 and 2 -----------------------------------------------------
  cplx_t rb_rd1 [2];
  cplx_t rb_rd2 [2];
  cplx_t bf_sum, bf_diff;
  logic  bf_valid;

  for (genvar k = 0; k < 2; k++) begin : g_rb
    register_bank u_rb (
      .clk, .rst,
      .load_en  (mem_load && (load_sel == 1'(k))),
      .load_data(load_data),
      .wr_en    (wb_valid && (wb_sel == 1'(k))),
      .wr_idx1  (wb_idx1), .wr_data1(bf_sum),
      .wr_idx2  (wb_idx2), .wr_data2(bf_diff),
      .rd_idx1  (rs1), .rd_data1(rb_rd1[k]),
      .rd_idx2  (rs2), .rd_data2(rb_rd2[k]),
      .regs     (rb_regs[k])
    );
  end

  // ---- butterfly with input register select -------------------------------------
  // A restart also empties the butterfly pipeline.
  butterfly #(.WIDE_SUM(WIDE_SUM)) u_bf (
    .clk,
    .rst     (rst || en_fft),
    .in_valid(issue),
    .a       (rb_rd1[in_sel]),
    .b       (rb_rd2[in_sel]),
    .csdb1, .csdb2,
    .out_valid(bf_valid),
    .sum     (bf_sum),
    .diff_w  (bf_diff)
  );

  // ---- store crossbar: bank b receives group element (b - g) mod 8 -------------
  always_comb begin
    for (int b = 0; b < N_BANKS; b++)
      write_data[b] = rb_regs[store_sel][addr_t'(b[2:0] - wr_group)];
  end
  assign memwrite = mem_store;

  a_wb_matches_bf: assert property (@(posedge clk) disable iff (rst) wb_valid == bf_valid)
    else $error("fft_processor: write-back select out of step with the butterfly");

endmodule
