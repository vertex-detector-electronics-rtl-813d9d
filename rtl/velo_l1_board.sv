// velo_l1_board: one L1 readout board of the vertex detector.
//
// The board receives the digitised data of N_CHIP front-end chips (four
// 8-bit links of 32 channels each per chip), keeps every L0 accepted event
// in an L1 buffer until the L1 trigger has decided, preprocesses the data
// for the L1 trigger, and sends the accepted events, zero-suppressed, to
// the DAQ.  Its parts, all on one clock here:
//  * fast and slow control FPGA: TTC broadcast command decoder, event
//    identification (L0ID, BCID, PCN from the front-end emulator), L1
//    accept and event pointer generation, throttle handling;
//  * front-end emulator (FEM), giving the PCN of each L0 accepted event;
//  * per chip: preprocessor FPGA (SPP), L1 buffer, DSP;
//  * L1 trigger link FPGA (L1T) and DAQ link FPGA, each with an S-LINK
//    sender;
//  * BOARD_READY generation.
// The TTC receiver, the flash ADCs, the ECS interface and the S-LINK cards
// are outside: their signals are the ports of this module.
//
// Resets: rst_n is the power-up reset.  L1_Reset (a TTC broadcast) clears
// all pointers, queues and counters of the data path but no configuration;
// L0_Reset resets the FEM and the L0 counter; L1ID_Reset clears the L1
// event counters in the DSPs and the DAQ FPGA.
module velo_l1_board
  import l1_pkg::*;
#(
  parameter int unsigned N_CHIP    = N_CHIPS,
  parameter int unsigned FE_LATENCY = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // TTC receiver
  input  logic [7:2]                        brcst,
  input  logic                              brcst_str1,
  input  logic                              l0_accept,
  input  logic [11:0]                       bcnt,
  input  logic                              bcnt_str,
  input  logic                              evcntres,
  input  logic                              ttc_ready,
  // flash ADCs
  input  logic [N_CHIP-1:0][LINKS-1:0][7:0] link_data,
  input  logic [N_CHIP-1:0][LINKS-1:0]      link_valid,
  // ECS
  input  board_cfg_t                        cfg,
  input  ped_wr_t                           ped_wr,
  input  ecs_cmd_t                          ecs_cmd,
  input  logic [N_CHIP+2:0]                init_done,   // FSC, SPPs, L1T, DAQ
  input  logic                              ecs_ready,
  // S-LINK to the L1 trigger and to the DAQ
  output slink_out_t                        l1t_link,
  input  slink_in_t                         l1t_link_in,
  output slink_out_t                        daq_link,
  input  slink_in_t                         daq_link_in,
  // front panel and status
  output logic                              board_ready,
  output logic                              throttle,
  output logic [N_CHIP-1:0][15:0]          throttle_counts,
  output logic [11:0]                       l0id,
  output logic                              fem_dv,
  output logic [3:0]                        fem_nib,
  output logic [N_CHIP-1:0][LINKS-1:0]     sync_err,
  output logic [31:0]                       l1t_events,
  output logic [31:0]                       l1t_truncated,
  output logic [31:0]                       daq_events,
  output logic [31:0]                       daq_l1id,
  output logic [N_CHIP-1:0]                dsp_l0id_err,
  output logic [31:0]                       l1_accepts,
  output logic [31:0]                       l1_decisions,
  output logic                              tag_error,     // PCN without event
  output logic                              fem_ovf,       // FEM derandomizer
  output logic [N_CHIP-1:0]                spp_overrun,   // L0 faster than 38 clocks
  output logic [N_CHIP-1:0]                spp_lost,      // SPP event queue overflow
  output logic [N_CHIP-1:0]                spp_forced,    // SPP sent an event empty
  output logic [N_CHIP-1:0]                dsp_throttle,
  output logic [N_CHIP+1:0]                l1t_fifo_ovf,
  output logic [31:0]                       l1t_sync_errs,
  output logic [31:0]                       l1t_sent,
  output logic [1:0]                        daq_fifo_ovf,
  output logic [31:0]                       daq_sync_errs,
  output logic [31:0]                       daq_truncated,
  output logic [31:0]                       daq_sent,
  output logic                              daq_data_trunc,
  output logic [2*N_CHIP+6:0]              ready_status
);
  // ------------------------------------------------ fast and slow control
  logic       fem_l0_reset, l0_reset, l1_reset, l1id_reset;
  logic       l1_dec_valid;
  logic [2:0] l1_dec_type;
  logic [1:0] l1_dec_l0id;
  logic       tag_valid;
  ev_tag_t    tag;
  logic       l1a_valid;
  logic [4:0] l1a_info;
  logic [PTR_W-1:0] l1a_ptr;

  fsc_cmd_decoder u_cmd (
    .clk, .rst_n, .brcst, .brcst_str1,
    .fem_l0_reset, .l0_reset, .l1_reset, .l1id_reset,
    .l1_dec_valid, .l1_dec_type, .l1_dec_l0id);

  fsc_tagger #(.FE_LATENCY(FE_LATENCY)) u_tag (
    .clk, .rst_n, .l0_accept, .l0_reset, .l0id_reset(evcntres),
    .ecs_l0id_wr(ecs_cmd.l0id_clear), .bcnt, .bcnt_str,
    .fem_nib, .fem_dv, .l0id, .tag_valid, .tag, .tag_error);

  fsc_l1_decision u_l1d (
    .clk, .rst_n, .l1_reset, .l1_dec_valid, .l1_dec_type, .l1_dec_l0id,
    .l1a_valid, .l1a_info, .l1a_ptr, .n_decisions(l1_decisions), .n_accepts(l1_accepts));

  // ------------------------------------------------- front-end emulator
  logic [7:0] fem_pcn_unused;
  logic       fem_busy_unused;

  fem u_fem (
    .clk, .rst_n, .l0_reset(fem_l0_reset), .l0_accept,
    .nib(fem_nib), .dv(fem_dv), .pcn(fem_pcn_unused), .derand_ovf(fem_ovf), .busy(fem_busy_unused));

  // ------------------------------------------------------ chip channels
  logic [N_CHIP-1:0][7:0]  l1t_bus;
  logic [N_CHIP-1:0]       l1t_bus_v;
  logic [N_CHIP-1:0][15:0] dsp_bus;
  logic [N_CHIP-1:0]       dsp_bus_v, dsp_full, dsp_rdy;

  for (genvar i = 0; i < N_CHIP; i++) begin : g_chip
    logic                  bw_e, br_e;
    logic [BUF_ADDR_W-1:0] bw_a, br_a;
    logic [31:0]           bw_d, br_d;
    logic                  ped_sel;
    logic [15:0]           l1id_unused, nerr_unused;
    logic [4:0]            occ_unused;

    assign ped_sel = ped_wr.we && (ped_wr.chip == 4'(i));

    spp_fpga u_spp (
      .clk, .rst_n, .l1_reset,
      .link_data(link_data[i]), .link_valid(link_valid[i]), .tag_valid, .tag,
      .ped_we(ped_sel), .ped_addr(ped_wr.addr), .ped_wdata(ped_wr.data),
      .threshold(cfg.hit_threshold), .cl_limit(cfg.spp_cl_limit),
      .timeout_en(cfg.spp_timeout_en),
      .buf_we(bw_e), .buf_addr(bw_a), .buf_wdata(bw_d),
      .l1t_data(l1t_bus[i]), .l1t_valid(l1t_bus_v[i]),
      .sync_err(sync_err[i]), .overrun(spp_overrun[i]), .forced(spp_forced[i]), .lost(spp_lost[i]));

    l1_buffer #(.ADDR_W(BUF_ADDR_W)) u_buf (
      .clk, .we(bw_e), .waddr(bw_a), .wdata(bw_d),
      .re(br_e), .raddr(br_a), .rdata(br_d));

    l1b_dsp u_dsp (
      .clk, .rst_n, .l1_reset, .l1id_reset, .ecs_l1id_wr(ecs_cmd.l1id_clear),
      .l1a_valid, .l1a_info, .l1a_ptr,
      .buf_re(br_e), .buf_raddr(br_a), .buf_rdata(br_d),
      .z_mode(cfg.z_mode), .np_count(cfg.np_count), .cl_limit(cfg.spp_cl_limit),
      .thr_events(cfg.derand_thr), .zs_threshold(cfg.zs_threshold),
      .ped_we(ped_sel), .ped_addr(ped_wr.addr), .ped_wdata(ped_wr.data),
      .out_data(dsp_bus[i]), .out_valid(dsp_bus_v[i]), .out_full(dsp_full[i]),
      .throttle(dsp_throttle[i]), .l1id(l1id_unused), .occupancy(occ_unused),
      .l0id_err(dsp_l0id_err[i]), .n_l0id_err(nerr_unused), .dsp_ready(dsp_rdy[i]));
  end

  // --------------------------------------------------- L1 trigger link

  l1t_fpga #(.N(N_CHIP)) u_l1t (
    .clk, .rst_n, .l1_reset, .spp_data(l1t_bus), .spp_valid(l1t_bus_v),
    .link_id(cfg.l1t_link_id), .board_no(cfg.board_no), .cl_limit(cfg.l1t_cl_limit),
    .link_reset(ecs_cmd.l1t_link_reset),
    .ud(l1t_link.ud), .uwen_n(l1t_link.uwen_n), .lff_n(l1t_link_in.lff_n),
    .ldown_n(l1t_link_in.ldown_n), .ureset_n(l1t_link.ureset_n),
    .fifo_ovf(l1t_fifo_ovf), .n_events(l1t_events), .n_truncated(l1t_truncated),
    .n_sync_err(l1t_sync_errs), .n_sent(l1t_sent));

  // ----------------------------------------------------------- DAQ link

  daq_fpga #(.N(N_CHIP)) u_daq (
    .clk, .rst_n, .l1_reset, .l1id_reset,
    .dsp_data(dsp_bus), .dsp_valid(dsp_bus_v), .dsp_full,
    .link_id(cfg.daq_link_id), .board_no(cfg.board_no), .cl_limit(cfg.l1t_cl_limit),
    .np_count(cfg.np_count), .link_reset(ecs_cmd.daq_link_reset),
    .ud(daq_link.ud), .uwen_n(daq_link.uwen_n), .lff_n(daq_link_in.lff_n),
    .ldown_n(daq_link_in.ldown_n), .ureset_n(daq_link.ureset_n),
    .fifo_ovf(daq_fifo_ovf), .l1id32(daq_l1id), .n_events(daq_events),
    .n_sync_err(daq_sync_errs), .n_truncated(daq_truncated), .n_sent(daq_sent),
    .stage_ovf(daq_data_trunc));

  // ------------------------------------------------ throttle and ready
  throttle_ctrl #(.N(N_CHIP), .CNT_W(16)) u_thr (
    .clk, .rst_n, .clr(l1_reset || ecs_cmd.throttle_cnt_clear),
    .throttle_in(dsp_throttle), .mask_en(cfg.throttle_mask[N_CHIP-1:0]),
    .throttle_out(throttle), .counts(throttle_counts));


  board_ready #(.N_FPGA(N_CHIP + 3), .N_DSP(N_CHIP), .N_LINK(2)) u_rdy (
    .clk, .rst_n, .ttc_ready, .init_done, .dsp_ready(dsp_rdy), .ecs_ready,
    .ldown_n({daq_link_in.ldown_n, l1t_link_in.ldown_n}),
    .board_ready_o(board_ready), .status(ready_status));

endmodule
