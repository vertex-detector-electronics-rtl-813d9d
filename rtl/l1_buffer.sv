// l1_buffer: the L1 buffer of one front-end chip, 128K words of 32 bits.
//
// Holds events while the L1 trigger decides: the preprocessor FPGA writes
// 38 words per event into a 64-word slot, the DSP reads accepted events
// back.  Address = {event pointer<10..0>, word<5..0>}, so 2K events fit.
// One synchronous write port and one synchronous read port; read data
// appear one clock after re_en.  A read of the word being written returns
// the old contents.  The real buffer is an external SRAM; this is its
// logic function as an array, with the port timing chosen here.
module l1_buffer #(
  parameter int unsigned ADDR_W = 17,
  parameter int unsigned W      = 32
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [W-1:0]      wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [W-1:0]      rdata
);
  logic [W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
