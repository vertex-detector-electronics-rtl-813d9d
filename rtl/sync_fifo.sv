// sync_fifo: single-clock first-in first-out buffer.
//
// Models the FIFO blocks of the board FPGAs: 8 bit x 256 words for the L1
// trigger input buffers, 16 bit x 128 words for the DAQ input buffers and
// 32 bit x 512 words for the two output buffers.  The head word is always
// visible on dout while empty is low (first-word fall-through); rd_en
// removes it.  A write while full is dropped and sets the sticky overflow
// flag; a read while empty is ignored.  clr empties the FIFO and clears
// the flag (used for L1_Reset).  A write and a read in the same clock are
// both performed.  The fall-through read and the sticky flag are this
// design's choices.
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 256
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       wr_en,
  input  logic [W-1:0]               din,
  input  logic                       rd_en,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == ($bits(count))'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign dout  = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else if (clr) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
      if (wr_en && full) overflow <= 1'b1;
      // the fill count never exceeds the depth
      assert (count <= ($bits(count))'(DEPTH));
    end
  end

endmodule
