// fsc_tagger: event identification in the fast and slow control FPGA.
//
// Keeps the 12-bit L0 event counter (L0ID), incremented by every L0 accept
// so that the first accepted event after a reset has L0ID = 1, and cleared
// by L0_Reset, by L0ID_Reset (the TTC receiver's EvCntRes pin) or by any
// ECS write.  The TTC receiver reports the 12-bit bunch counter of each
// accepted event with BCntStr; the pair {L0ID, BCID} is queued.  The
// front-end emulator later reads out the pipeline column number (PCN) of
// the event as two 4-bit words with DataValid; they are joined into one
// 8-bit PCN (high nibble first), matched with the oldest queued
// {L0ID, BCID}, and the complete tag is delayed by FE_LATENCY clocks, the
// latency of the real front-end data behind the emulator, before it is
// sent to the preprocessor FPGAs.
//
// Interface: tag_valid is a one-clock strobe with the tag.  BCntStr must
// come at least one clock after the L0 accept it belongs to and before the
// next one.  The nibble order, the queue depth and FE_LATENCY are this
// design's choices; the counter widths and resets follow the description.
module fsc_tagger #(
  parameter int unsigned FE_LATENCY     = 8,
  parameter int unsigned TAG_FIFO_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 l0_accept,
  input  logic                 l0_reset,
  input  logic                 l0id_reset,   // EvCntRes
  input  logic                 ecs_l0id_wr,
  input  logic [11:0]          bcnt,
  input  logic                 bcnt_str,
  input  logic [3:0]           fem_nib,
  input  logic                 fem_dv,
  output logic [11:0]          l0id,
  output logic                 tag_valid,
  output l1_pkg::ev_tag_t      tag,
  output logic                 tag_error      // PCN without queued event
);
  import l1_pkg::*;

  logic [23:0] q_dout;
  logic        q_empty, q_full_unused, q_ovf;
  logic [$clog2(TAG_FIFO_DEPTH+1)-1:0] q_count_unused;
  logic        nib_phase;
  logic [3:0]  nib_hi;
  logic        pcn_done;
  ev_tag_t     new_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   l0id <= '0;
    else if (l0_reset || l0id_reset || ecs_l0id_wr) l0id <= '0;
    else if (l0_accept)                           l0id <= l0id + 1'b1;
  end

  sync_fifo #(.W(24), .DEPTH(TAG_FIFO_DEPTH)) u_q (
    .clk, .rst_n, .clr(l0_reset),
    .wr_en(bcnt_str), .din({l0id, bcnt}),
    .rd_en(pcn_done), .dout(q_dout),
    .empty(q_empty), .full(q_full_unused), .count(q_count_unused), .overflow(q_ovf));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nib_phase <= 1'b0;
      nib_hi    <= '0;
    end else if (l0_reset) begin
      nib_phase <= 1'b0;
    end else if (fem_dv) begin
      nib_phase <= !nib_phase;
      if (!nib_phase) nib_hi <= fem_nib;
    end
  end

  assign pcn_done = fem_dv && nib_phase && !l0_reset;
  assign new_tag  = '{l0id: q_dout[23:12], bcid: q_dout[11:0], pcn: {nib_hi, fem_nib}};

  // Front-end latency delay line.
  logic    dl_v [FE_LATENCY+1];
  ev_tag_t dl_t [FE_LATENCY+1];
  assign dl_v[0] = pcn_done && !q_empty;
  assign dl_t[0] = new_tag;

  for (genvar i = 0; i < FE_LATENCY; i++) begin : g_dl
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dl_v[i+1] <= 1'b0;
        dl_t[i+1] <= '0;
      end else begin
        dl_v[i+1] <= dl_v[i] && !l0_reset;
        dl_t[i+1] <= dl_t[i];
      end
    end
  end

  assign tag_valid = dl_v[FE_LATENCY];
  assign tag       = dl_t[FE_LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        tag_error <= 1'b0;
    else if (l0_reset) tag_error <= 1'b0;
    else if ((pcn_done && q_empty) || q_ovf) tag_error <= 1'b1;
  end

endmodule
