// fem: front-end emulator.
//
// Reproduces the part of the front-end chip's control logic that the L1
// board needs: the pipeline column number (PCN), an 8-bit counter that
// advances every clock, is stored on each L0 accept and is sent with the
// event.  Stored PCNs wait in a derandomizer; whenever the readout is idle
// and the derandomizer holds an event, one event is read out: the PCN is
// put on the 4-bit bus as two words, high nibble first, each with
// DataValid, and the readout then stays busy for the rest of a
// FRAME_CYCLES-clock frame, the time the real chip needs to send its 32
// channels.  L0_Reset clears the counter, the derandomizer and any running
// readout.  There is no ready output.
//
// Interface: l0_accept is a one-clock strobe.  derand_ovf is sticky and
// flags an accept that found the derandomizer full.  The derandomizer
// depth, the frame length and the nibble order are this design's choices.
module fem #(
  parameter int unsigned PCN_W        = 8,
  parameter int unsigned DERAND_DEPTH = 16,
  parameter int unsigned FRAME_CYCLES = 54    // 900 ns at 60 MHz
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             l0_reset,
  input  logic             l0_accept,
  output logic [3:0]       nib,
  output logic             dv,
  output logic [PCN_W-1:0] pcn,        // current column number
  output logic             derand_ovf,
  output logic             busy
);
  logic [PCN_W-1:0] d_dout;
  logic             d_empty, d_full_unused, d_ovf;
  logic [$clog2(DERAND_DEPTH+1)-1:0] d_count_unused;
  logic [$clog2(FRAME_CYCLES+1)-1:0] frame_cnt;
  logic [PCN_W-1:0] cur;
  logic             start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pcn <= '0;
    else if (l0_reset) pcn <= '0;
    else               pcn <= pcn + 1'b1;
  end

  sync_fifo #(.W(PCN_W), .DEPTH(DERAND_DEPTH)) u_derand (
    .clk, .rst_n, .clr(l0_reset),
    .wr_en(l0_accept && !l0_reset), .din(pcn),
    .rd_en(start), .dout(d_dout),
    .empty(d_empty), .full(d_full_unused), .count(d_count_unused), .overflow(d_ovf));

  assign derand_ovf = d_ovf;
  assign busy       = (frame_cnt != 0);
  assign start      = (frame_cnt <= 1) && !d_empty && !l0_reset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_cnt <= '0;
      cur       <= '0;
    end else if (l0_reset) begin
      frame_cnt <= '0;
    end else if (start) begin
      frame_cnt <= ($bits(frame_cnt))'(FRAME_CYCLES);
      cur       <= d_dout;
    end else if (busy) begin
      frame_cnt <= frame_cnt - 1'b1;
    end
  end

  // Header words in the first two clocks of the frame.
  always_comb begin
    dv  = 1'b0;
    nib = '0;
    if (frame_cnt == ($bits(frame_cnt))'(FRAME_CYCLES)) begin
      dv  = 1'b1;
      nib = cur[PCN_W-1 -: 4];
    end else if (frame_cnt == ($bits(frame_cnt))'(FRAME_CYCLES - 1)) begin
      dv  = 1'b1;
      nib = cur[3:0];
    end
  end
endmodule
