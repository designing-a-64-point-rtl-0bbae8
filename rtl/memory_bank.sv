// memory_bank: one two-port memory bank of the FFT processor, DEPTH words of
// WIDTH bits, with a write address bus and a separate read address bus so
// that a word can be written while another is read.
//
// Eight of these banks hold the 64 complex samples; the skewed placement of
// the samples across banks lets the processor fetch or store eight samples in
// one cycle. Bank count, 32-bit words and independent read/write address
// buses follow the processor description; the single-cycle write and the
// asynchronous (combinational) read, as in small distributed RAM, are this
// design's choices.
//
// Timing: wdata is written to waddr at the rising clock edge when we is high.
// rdata shows the word at raddr combinationally. The contents are not reset.
// The processor never reads and writes a bank in the same cycle; if both
// happen to address the same word, rdata shows the old word.
module memory_bank #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
