// register_bank: eight complex registers holding one 8-point group of the
// transform while the butterfly works on it (Register Bank 1 or 2 of the data
// path).
//
// The whole group is loaded at once from the eight memory banks (load_en),
// two operands are read through two 8-to-1 multiplexers (rd_idx1 / rd_idx2,
// the RS1 / RS2 selects), and the two results of a butterfly are written back
// in place (wr_en with wr_idx1 / wr_idx2). regs presents all eight registers
// for the store to memory.
//
// Timing: reads are combinational; loads and write-backs take effect at the
// rising edge. A load and a write-back never coincide in the processor's
// schedule (an assertion checks it); if they did, the load would win.
// Synchronous active-high reset clears the registers. The register bank and
// its operand multiplexers follow the data path of the processor; the exact
// port arrangement is this design's choice.
module register_bank
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  load_en,
  input  cplx_t load_data [RADIX],
  input  logic  wr_en,
  input  addr_t wr_idx1,
  input  cplx_t wr_data1,
  input  addr_t wr_idx2,
  input  cplx_t wr_data2,
  input  addr_t rd_idx1,
  output cplx_t rd_data1,
  input  addr_t rd_idx2,
  output cplx_t rd_data2,
  output cplx_t regs [RADIX]
);

  cplx_t r [RADIX];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < RADIX; i++) r[i] <= '0;
    end else if (load_en) begin
      for (int i = 0; i < RADIX; i++) r[i] <= load_data[i];
    end else if (wr_en) begin
      r[wr_idx1] <= wr_data1;
      r[wr_idx2] <= wr_data2;
    end
  end

  assign rd_data1 = r[rd_idx1];
  assign rd_data2 = r[rd_idx2];
  assign regs     = r;

  a_no_load_and_write: assert property (@(posedge clk) disable iff (rst) !(load_en && wr_en))
    else $error("register_bank: load and write-back in the same cycle");
  a_distinct_write: assert property (@(posedge clk) disable iff (rst) wr_en |-> wr_idx1 != wr_idx2)
    else $error("register_bank: both results written to the same register");

endmodule
