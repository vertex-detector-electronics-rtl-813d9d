// l1t_fpga: L1 trigger link control FPGA of the board.
//
// Receives the cluster lists of the N preprocessor FPGAs on N 8-bit buses
// into N input FIFOs of 8 bit x 256 words (the FIFO block size of the
// FPGA family the board uses), assembles each event with the event
// builder into a 32-bit x 512-word output FIFO, and sends complete events
// to the L1 trigger over the S-LINK sender.  There is no throttle on this
// path; the cluster limit bounds the size of each event.  Overflow of any
// FIFO is reported in fifo_ovf (sticky until L1_Reset).
// While the 16-entry length queue is full the builder sees no free
// space and holds the next event.
module l1t_fpga #(
  parameter int unsigned N         = 16,
  parameter int unsigned IN_DEPTH  = 256,
  parameter int unsigned OUT_DEPTH = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 l1_reset,
  input  logic [N-1:0][7:0]    spp_data,
  input  logic [N-1:0]         spp_valid,
  // ECS configuration
  input  logic [15:0]          link_id,
  input  logic [7:0]           board_no,
  input  logic [7:0]           cl_limit,
  input  logic                 link_reset,
  // S-LINK
  output logic [31:0]          ud,
  output logic                 uwen_n,
  input  logic                 lff_n,
  input  logic                 ldown_n,
  output logic                 ureset_n,
  // monitoring
  output logic [N+1:0]         fifo_ovf,
  output logic [31:0]          n_events,
  output logic [31:0]          n_truncated,
  output logic [31:0]          n_sync_err,
  output logic [31:0]          n_sent
);
  localparam int unsigned OCW = $clog2(OUT_DEPTH + 1);

  logic [N-1:0][7:0] in_data;
  logic [N-1:0]      in_empty, in_rd;
  logic              out_wr, out_rd, out_empty, len_wr, len_rd, len_empty;
  logic [31:0]       out_din, out_dout;
  logic [OCW-1:0]    out_count;
  logic              len_full;
  logic [15:0]       len_din, len_dout;
  logic              in_reset_unused;

  for (genvar i = 0; i < N; i++) begin : g_in
    logic                            full_unused;
    logic [$clog2(IN_DEPTH+1)-1:0]   count_unused;
    sync_fifo #(.W(8), .DEPTH(IN_DEPTH)) u_in (
      .clk, .rst_n, .clr(l1_reset),
      .wr_en(spp_valid[i]), .din(spp_data[i]),
      .rd_en(in_rd[i]), .dout(in_data[i]),
      .empty(in_empty[i]), .full(full_unused), .count(count_unused),
      .overflow(fifo_ovf[i]));
  end

  l1t_event_builder #(.N(N), .OUT_AW(OCW)) u_bld (
    .clk, .rst_n, .l1_reset, .link_id, .board_no, .limit(cl_limit),
    .in_data, .in_empty, .in_rd,
    .out_wr, .out_data(out_din), .out_free(len_full ? '0 : OCW'(OUT_DEPTH) - out_count),
    .len_wr, .len_data(len_din),
    .n_events, .n_truncated, .n_sync_err);

  logic out_full_unused;
  logic [4:0] len_count_unused;

  sync_fifo #(.W(32), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n, .clr(l1_reset),
    .wr_en(out_wr), .din(out_din), .rd_en(out_rd), .dout(out_dout),
    .empty(out_empty), .full(out_full_unused), .count(out_count),
    .overflow(fifo_ovf[N]));

  sync_fifo #(.W(16), .DEPTH(16)) u_len (
    .clk, .rst_n, .clr(l1_reset),
    .wr_en(len_wr), .din(len_din), .rd_en(len_rd), .dout(len_dout),
    .empty(len_empty), .full(len_full), .count(len_count_unused),
    .overflow(fifo_ovf[N+1]));

  slink_tx u_link (
    .clk, .rst_n,
    .fifo_data(out_dout), .fifo_empty(out_empty), .fifo_rd(out_rd),
    .len_data(len_dout), .len_empty(len_empty), .len_rd,
    .link_reset, .ud, .uwen_n, .lff_n, .ldown_n, .ureset_n,
    .n_sent, .in_reset(in_reset_unused));
endmodule
