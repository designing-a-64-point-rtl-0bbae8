// agu: address generator unit. Produces the eight read addresses and the
// eight write addresses of the memory banks, one per bank, from two counters.
//
// Sample n lives in bank (n mod 8 + n div 8) mod 8 at address n div 8. The
// transform works on 8-point groups: in pass 0 group g is the column
// {g, g+8, .., g+56}, in pass 1 it is the row {8g, .., 8g+7}. In both cases
// group element q sits in bank (g + q) mod 8, so one group is read or
// written in a single cycle. Bank b is addressed with (b - g) mod 8 in pass 0
// and with g in pass 1. The load crossbar rotates by g accordingly
// (rd_group / wr_group).
//
// The read counter advances after each group load (rd_step), the write
// counter after each group store (wr_step); the counters run through pass 0
// groups 0..7 and then pass 1 groups 0..7. clear (the start of a transform)
// and reset return both to pass 0, group 0. Outputs are combinational from
// the counters. The memory map follows the processor's memory-mapping table;
// the two-counter structure is this design's reading of "an address generator
// performed by a counter".
module agu
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  clear,
  input  logic  rd_step,
  input  logic  wr_step,
  output addr_t read_add  [N_BANKS],
  output addr_t write_add [N_BANKS],
  output addr_t rd_group,
  output addr_t wr_group,
  output logic  rd_pass,
  output logic  wr_pass
);

  logic [3:0] rd_cnt, wr_cnt;   // {pass, group}

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      rd_cnt <= '0;
      wr_cnt <= '0;
    end else begin
      if (rd_step) rd_cnt <= rd_cnt + 4'd1;
      if (wr_step) wr_cnt <= wr_cnt + 4'd1;
    end
  end

  assign rd_group = rd_cnt[2:0];
  assign rd_pass  = rd_cnt[3];
  assign wr_group = wr_cnt[2:0];
  assign wr_pass  = wr_cnt[3];

  always_comb begin
    for (int b = 0; b < N_BANKS; b++) begin
      read_add[b]  = rd_pass ? rd_group : addr_t'(b[2:0] - rd_group);
      write_add[b] = wr_pass ? wr_group : addr_t'(b[2:0] - wr_group);
    end
  end

endmodule
