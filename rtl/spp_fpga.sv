// spp_fpga: synchronisation and L1 preprocessor FPGA for one front-end
// chip (128 channels, four analog links).
//
// Two paths leave this FPGA.  The formatter checks the PCN of the four
// links, writes the 38-word event into the L1 buffer and builds the hit
// map (pedestal subtraction and threshold).  The hit map then goes to the
// cluster encoder, and the resulting cluster list, with a three-byte
// header, is sent to the L1 trigger link FPGA on the 8-bit bus.
//
// Events are handled one at a time by the encoder and the sender, which
// need up to 2 clocks per cluster.  The time-out of the encoder
// (ECS-switchable) keeps this within the event spacing.  Without it a busy
// event can take longer than the spacing; events then wait in a queue of
// EV_QUEUE (8) entries, and an event that arrives while another one is
// still waiting is queued without its hits: it is sent with no clusters
// and T = 1 (sticky flag forced).  An empty event takes a few clocks, so
// every event keeps its place in the L1 trigger stream; at 38 or more
// clocks per event and at most 64 clusters the queue never fills (sticky
// flag lost otherwise).  The queue and the forced-empty rule are this
// design's choices.
module spp_fpga
  import l1_pkg::*;
#(
  parameter int unsigned TIMEOUT_DEFAULT = 16,
  parameter int unsigned EV_QUEUE        = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     l1_reset,
  input  logic [LINKS-1:0][7:0]    link_data,
  input  logic [LINKS-1:0]         link_valid,
  input  logic                     tag_valid,
  input  ev_tag_t                  tag,
  // ECS configuration
  input  logic                     ped_we,
  input  logic [6:0]               ped_addr,
  input  logic [7:0]               ped_wdata,
  input  logic [7:0]               threshold,
  input  logic [6:0]               cl_limit,
  input  logic                     timeout_en,
  // L1 buffer write port
  output logic                     buf_we,
  output logic [BUF_ADDR_W-1:0]    buf_addr,
  output logic [31:0]              buf_wdata,
  // to the L1 trigger link FPGA
  output logic [7:0]               l1t_data,
  output logic                     l1t_valid,
  // status
  output logic [LINKS-1:0]         sync_err,   // E of the last event
  output logic                     overrun,
  output logic                     forced,     // an event was sent empty
  output logic                     lost
);
  logic                   ev_valid;
  logic [CH_PER_CHIP-1:0] ev_hits;
  ev_tag_t                ev_tag;
  logic [7:0]             ev_pcn_unused;   // the PCN goes only into the buffer
  assign ev_pcn_unused = ev_tag.pcn;
  logic [LINKS-1:0]       ev_err;
  logic [PTR_W-1:0]       ev_slot_unused;

  // queue of events waiting for the encoder: {forced, hits, L0ID, BCID<1..0>, E}
  localparam int unsigned QW = 1 + CH_PER_CHIP + 12 + 2 + LINKS;
  logic [QW-1:0]          q_din, q_dout;
  logic                   q_empty, q_full, q_wr, q_ovf_unused;
  logic [$clog2(EV_QUEUE+1)-1:0] q_count_unused;
  logic                   pend_forced;
  logic [CH_PER_CHIP-1:0] pend_hits;
  logic [11:0]            pend_l0id;
  logic [1:0]             pend_bc;
  logic [LINKS-1:0]       pend_err;
  logic                   enc_forced;

  logic [11:0]            enc_l0id;
  logic [1:0]             enc_bc;
  logic [LINKS-1:0]       enc_err;
  logic                   enc_start, enc_busy, enc_done, enc_trunc;
  logic [6:0]             enc_n;
  logic [5:0]             rd_idx;
  cluster_t               rd_cl;
  logic                   tx_busy;

  spp_formatter u_fmt (
    .clk, .rst_n, .l1_reset, .link_data, .link_valid, .tag_valid, .tag,
    .ped_we, .ped_addr, .ped_wdata, .threshold,
    .buf_we, .buf_addr, .buf_wdata,
    .ev_valid, .ev_hits, .ev_tag, .ev_err, .ev_slot(ev_slot_unused), .overrun);

  // An event arriving while another one still waits is queued without its
  // hits and marked forced: it is sent with no clusters and T = 1.
  logic force_empty;
  assign force_empty = !q_empty;
  assign q_wr  = ev_valid && !q_full;
  assign q_din = {force_empty, force_empty ? '0 : ev_hits, ev_tag.l0id, ev_tag.bcid[1:0], ev_err};
  assign {pend_forced, pend_hits, pend_l0id, pend_bc, pend_err} = q_dout;

  sync_fifo #(.W(QW), .DEPTH(EV_QUEUE)) u_q (
    .clk, .rst_n, .clr(l1_reset),
    .wr_en(q_wr), .din(q_din), .rd_en(enc_start), .dout(q_dout),
    .empty(q_empty), .full(q_full), .count(q_count_unused), .overflow(q_ovf_unused));

  assign enc_start = !q_empty && !enc_busy && !enc_done && !tx_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_l0id   <= '0;
      enc_bc     <= '0;
      enc_err    <= '0;
      enc_forced <= 1'b0;
      lost       <= 1'b0;
      forced     <= 1'b0;
      sync_err   <= '0;
    end else if (l1_reset) begin
      lost       <= 1'b0;
      forced     <= 1'b0;
      sync_err   <= '0;
    end else begin
      if (enc_start) begin
        enc_l0id   <= pend_l0id;
        enc_bc     <= pend_bc;
        enc_err    <= pend_err;
        enc_forced <= pend_forced;
      end
      if (ev_valid) begin
        sync_err <= ev_err;
        if (q_full)    lost   <= 1'b1;
        if (force_empty) forced <= 1'b1;
      end
    end
  end

  cluster_encoder #(.CHANNELS(CH_PER_CHIP), .MAX_CL(MAX_SPP_CL)) u_enc (
    .clk, .rst_n, .start(enc_start), .hits(pend_hits), .limit(cl_limit),
    .timeout_en, .timeout(8'(TIMEOUT_DEFAULT)),
    .busy(enc_busy), .done(enc_done), .cl_n(enc_n), .trunc(enc_trunc),
    .rd_idx, .rd_cl);

  spp_l1t_tx #(.MAX_CL(MAX_SPP_CL)) u_tx (
    .clk, .rst_n, .start(enc_done), .l0id(enc_l0id), .bcid_lsb(enc_bc),
    .error({overrun, |enc_err}), .n(enc_n), .trunc(enc_trunc || enc_forced),
    .rd_idx, .rd_cl, .busy(tx_busy), .tx_data(l1t_data), .tx_valid(l1t_valid));

endmodule
