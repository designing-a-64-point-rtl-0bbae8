// fft64_top: 64-point FFT/IFFT processor for an OFDM modem, with its eight
// two-port memory banks and a host port.
//
// The host writes the 64 time samples by index n, pulses en_fft, waits for
// done_fft (197 cycles later) and reads the 64 results by index k. The
// processor works in place, so the memory then holds the transform in
// bit-reversed order; the host read port undoes that, mapping k to position
// bitrev6(k), so results are read in natural order. Sample n is kept in bank
// (n mod 8 + n div 8) mod 8 at address n div 8.
//
// The forward transform is X(k) = (1/64) sum_n x(n) exp(-j 2 pi n k / 64).
// With ifft high, the host port swaps the real and imaginary parts of every
// sample written and of every result read; the same engine then returns
// x(n) = (1/64) sum_k X(k) exp(+j 2 pi n k / 64), the inverse transform.
// ifft only acts on the host port, so it must be steady while data are
// written and read.
//
// Host port: host_we writes host_wdata to sample host_widx at the rising
// edge; host_rdata shows result host_ridx combinationally. Both are ignored /
// invalid while busy is high: the processor owns the memory then.
// Reset: synchronous, active high.
//
// The processor, the eight banks and their memory map, en_fft / done_fft,
// the bit-reversed output and the real/imaginary swap for the inverse
// transform follow the processor description; the host port, the natural
// order read-out and the ifft pin are this design's.
module fft64_top
  import fft_pkg::*;
#(
  parameter bit WIDE_SUM = 1'b1   // 1: overflow-free 17-bit butterfly sums, 0: 16-bit adders
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ifft,
  input  logic       en_fft,
  output logic       busy,
  output logic       done_fft,
  output logic       bypass,
  input  logic       host_we,
  input  logic [5:0] host_widx,
  input  cplx_t      host_wdata,
  input  logic [5:0] host_ridx,
  output cplx_t      host_rdata
);

  // ---- processor --------------------------------------------------------------
  addr_t p_read_add   [N_BANKS];
  addr_t p_write_add  [N_BANKS];
  cplx_t p_write_data [N_BANKS];
  cplx_t read_data    [N_BANKS];
  logic  p_memwrite;

  fft_processor #(.WIDE_SUM(WIDE_SUM)) u_proc (
    .clk, .rst, .en_fft, .done_fft, .busy,
    .read_add  (p_read_add),
    .read_data (read_data),
    .write_add (p_write_add),
    .write_data(p_write_data),
    .memwrite  (p_memwrite),
    .bypass
  );

  // ---- host side address mapping ---------------------------------------------
  logic [5:0] rpos;
  cplx_t      wswap;
  bank_t      h_wbank, h_rbank;
  addr_t      h_waddr, h_raddr;

  always_comb begin
    rpos    = {host_ridx[0], host_ridx[1], host_ridx[2],
               host_ridx[3], host_ridx[4], host_ridx[5]};
    h_wbank = map_bank(host_widx);
    h_waddr = map_addr(host_widx);
    h_rbank = map_bank(rpos);
    h_raddr = map_addr(rpos);
    wswap   = ifft ? cplx_t'{re: host_wdata.im, im: host_wdata.re} : host_wdata;
  end

  // ---- memory banks ------------------------------------------------------------
  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    logic  we;
    addr_t waddr, raddr;
    cplx_t wdata;

    always_comb begin
      if (busy) begin
        we    = p_memwrite;
        waddr = p_write_add[b];
        wdata = p_write_data[b];
        raddr = p_read_add[b];
      end else begin
        we    = host_we && (h_wbank == bank_t'(b));
        waddr = h_waddr;
        wdata = wswap;
        raddr = h_raddr;
      end
    end

    memory_bank #(.DEPTH(BANK_DEPTH), .WIDTH(WORD_W)) u_mem (
      .clk,
      .we,
      .waddr,
      .wdata(wdata),
      .raddr,
      .rdata(read_data[b])
    );
  end

  cplx_t rsel;
  assign rsel       = read_data[h_rbank];
  assign host_rdata = ifft ? cplx_t'{re: rsel.im, im: rsel.re} : rsel;

endmodule
