// l1b_dsp: event processing of one L1 buffer DSP, written as logic.
//
// On the board this is a programmable DSP; this module implements the
// processing the board description assigns to it.  For every L1 accept
// (slot pointer and five decision bits from the fast-control FPGA) it
//  * increments its 16-bit L1ID (the first event after L1ID_Reset or
//    L1_Reset has L1ID = 1; the first event after such a reset carries
//    the resync flag R),
//  * copies the 38-word event from the L1 buffer into the L1 derandomizer
//    (16 events),
//  * checks L0ID<1..0> of the stored event against the two L0ID bits of
//    the decision (sticky l0id_err, counted),
//  * zero-suppresses the 128 channels into DAQ clusters: a channel whose
//    sample exceeds its pedestal by more than the threshold belongs to a
//    cluster; runs of such channels give clusters of up to 7 channels
//    carrying the pedestal-subtracted values,
//  * encodes the stored L1 trigger hit map into clusters exactly as the
//    preprocessor does, with the same limit and truncation flag T,
//  * appends np_count raw samples starting at channel 4*L1ID<4..0>
//    (all 128 channels in the no-processing mode Z, where no DAQ clusters
//    are produced and N = 0),
//  * sends the five header words and the body (see dsp_pkg) on the 16-bit
//    link, one word per clock while the DAQ input FIFO is not full.
// The event occupancy (accepted and not yet sent) is compared with the
// 4-bit ECS threshold (13 by default): at or above it the throttle is
// raised.  Back pressure from the DAQ link FPGA thus fills the
// derandomizer and leads to throttle, as described for the board.
//
// Pedestal following and noise computation of the real DSP are not
// modelled: pedestals are loaded by the ECS.  Word packing, the pedestal
// table and the single-event output buffer are this design's choices.
module l1b_dsp
  import l1_pkg::*;
  import dsp_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   l1_reset,
  input  logic                   l1id_reset,
  input  logic                   ecs_l1id_wr,
  // L1 accept from the fast-control FPGA
  input  logic                   l1a_valid,
  input  logic [4:0]             l1a_info,
  input  logic [PTR_W-1:0]       l1a_ptr,
  // L1 buffer read port
  output logic                   buf_re,
  output logic [BUF_ADDR_W-1:0]  buf_raddr,
  input  logic [31:0]            buf_rdata,
  // ECS configuration
  input  logic                   z_mode,
  input  logic [7:0]             np_count,
  input  logic [6:0]             cl_limit,
  input  logic [3:0]             thr_events,
  input  logic [7:0]             zs_threshold,
  input  logic                   ped_we,
  input  logic [6:0]             ped_addr,
  input  logic [7:0]             ped_wdata,
  // link to the DAQ FPGA
  output logic [15:0]            out_data,
  output logic                   out_valid,
  input  logic                   out_full,
  // status
  output logic                   throttle,
  output logic [15:0]            l1id,
  output logic [4:0]             occupancy,
  output logic                   l0id_err,
  output logic [15:0]            n_l0id_err,
  output logic                   dsp_ready
);
  // ---------------------------------------------------------------- L1ID
  logic resync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1id   <= '0;
      resync <= 1'b1;
    end else if (l1id_reset || l1_reset || ecs_l1id_wr) begin
      l1id   <= '0;
      resync <= 1'b1;
    end else if (l1a_valid) begin
      l1id   <= l1id + 1'b1;
      resync <= 1'b0;
    end
  end

  // Fixed logic needs no program load, so the DSP is ready out of reset;
  // the output stays because the board READY logic expects one per DSP.
  assign dsp_ready = 1'b1;

  // ------------------------------------------------------- request queue
  // Accepts waiting for the copy into the derandomizer (16 entries).  The
  // throttle, raised at 13 events, is meant to keep it from filling; its
  // full and overflow flags are not used.
  localparam int unsigned RQW = PTR_W + 5 + 16 + 1;
  logic [RQW-1:0] rq_dout;
  logic           rq_empty, rq_full_unused, rq_ovf_unused, rq_rd;
  logic [4:0]     rq_count_unused;

  sync_fifo #(.W(RQW), .DEPTH(DERAND_EVENTS)) u_rq (
    .clk, .rst_n, .clr(l1_reset),
    .wr_en(l1a_valid), .din({l1a_ptr, l1a_info, l1id + 16'd1, resync}),
    .rd_en(rq_rd), .dout(rq_dout),
    .empty(rq_empty), .full(rq_full_unused), .count(rq_count_unused), .overflow(rq_ovf_unused));

  // ------------------------------------------------------- derandomizer
  logic [31:0]      dmem [DERAND_EVENTS * SLOT_WORDS];
  logic [4:0]       meta_info [DERAND_EVENTS];
  logic [15:0]      meta_l1id [DERAND_EVENTS];
  logic             meta_r    [DERAND_EVENTS];
  logic [3:0]       wslot, rslot;
  logic [4:0]       dcount;        // complete events in the derandomizer
  logic             fetching;
  logic [5:0]       fk;            // word being requested
  logic             fvalid;        // read data of word fk-1 arrive
  logic             proc_done;

  assign rq_rd = !fetching && !rq_empty && !l1_reset &&
                 (dcount < 5'(DERAND_EVENTS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetching  <= 1'b0;
      fk        <= '0;
      fvalid    <= 1'b0;
      wslot     <= '0;
      buf_re    <= 1'b0;
      buf_raddr <= '0;
    end else if (l1_reset) begin
      fetching  <= 1'b0;
      fvalid    <= 1'b0;
      wslot     <= '0;
      buf_re    <= 1'b0;
    end else begin
      buf_re <= 1'b0;
      fvalid <= buf_re;
      if (rq_rd) begin
        fetching <= 1'b1;
        fk       <= '0;
        buf_raddr <= {rq_dout[RQW-1 -: PTR_W], 6'd0};
        buf_re   <= 1'b1;
        meta_info[wslot] <= rq_dout[RQW-PTR_W-1 -: 5];
        meta_l1id[wslot] <= rq_dout[16:1];
        meta_r[wslot]    <= rq_dout[0];
      end else if (fetching) begin
        if (fk != 6'(EV_WORDS - 1)) begin
          buf_re    <= 1'b1;
          buf_raddr <= buf_raddr + 1'b1;
          fk        <= fk + 1'b1;
        end
        if (fvalid && buf_raddr[5:0] == 6'(EV_WORDS - 1) && !buf_re) begin
          fetching <= 1'b0;
          wslot    <= wslot + 1'b1;
        end
      end
    end
  end

  // Store returning words: word index is the address of the previous read.
  logic [5:0] fw;
  always_ff @(posedge clk) begin
    fw <= buf_raddr[5:0];
  end
  always_ff @(posedge clk) begin
    if (fvalid) dmem[{wslot, fw}] <= buf_rdata;
  end

  logic ev_stored;
  assign ev_stored = fetching && fvalid && fw == 6'(EV_WORDS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        dcount <= '0;
    else if (l1_reset) dcount <= '0;
    else dcount <= dcount + 5'(ev_stored) - 5'(proc_done);
  end

  // occupancy: accepted but not yet sent
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        occupancy <= '0;
    else if (l1_reset) occupancy <= '0;
    else occupancy <= occupancy + 5'(l1a_valid) - 5'(proc_done);
  end
  assign throttle = (occupancy >= {1'b0, thr_events});

  // ----------------------------------------------------------- processor
  typedef enum logic [3:0] {P_IDLE, P_HDRCHK, P_SCAN, P_EMIT, P_HITS, P_ENC,
                            P_L1T, P_NP, P_SEND} pstate_t;
  pstate_t st;

  logic [7:0]  ped [CH_PER_CHIP];
  always_ff @(posedge clk) if (ped_we) ped[ped_addr] <= ped_wdata;

  logic [5:0]  rword;
  logic [31:0] rdw;
  assign rdw = dmem[{rslot, rword}];

  logic [7:0]  c;             // channel counter (8 bits to reach 128)
  logic [7:0]  amp;
  logic [1:0]  lane;
  logic [2:0]  run_len;
  logic [6:0]  run_addr;
  logic [7:0]  run_val [MAX_DAQ_CL_LEN];
  logic        scan_end;
  logic [2:0]  ek;            // emit step
  logic [7:0]  n_daq;
  logic [CH_PER_CHIP-1:0] hitmap;
  logic [1:0]  hk;
  logic        enc_start, enc_busy, enc_done, enc_trunc;
  logic [6:0]  enc_n;
  logic [5:0]  enc_idx;
  cluster_t    enc_cl;
  logic [6:0]  m_cl;
  logic        t_flag;
  logic [7:0]  bk;            // byte counter for L1T / NP sections
  logic [7:0]  np_n;
  logic [7:0]  lo_byte;
  logic [15:0] body [256];
  logic [7:0]  wp;            // body words written
  logic [8:0]  sk;            // words sent
  logic [3:0]  e_flags;
  logic [11:0] ev_l0id, ev_bcid;
  logic [7:0]  ev_pcn;
  logic        zs_hit;
  logic [7:0]  zs_val;
  logic [6:0]  np_first;
  logic [6:0]  np_ch;

  assign lane   = c[6:5];
  assign amp    = rdw[8*lane +: 8];
  assign zs_hit = {1'b0, amp} > ({1'b0, ped[c[6:0]]} + {1'b0, zs_threshold});
  assign zs_val = amp - ped[c[6:0]];
  assign np_first = z_mode ? 7'd0 : {meta_l1id[rslot][4:0], 2'b00};
  assign np_ch  = np_first + bk[6:0];

  // word of the derandomizer slot to read
  always_comb begin
    case (st)
      P_HDRCHK: rword = {5'd0, c[0]};
      P_SCAN:   rword = 6'd33 - {1'b0, c[4:0]};
      P_HITS:   rword = 6'(FRAME_WORDS) + {4'd0, hk};
      P_NP:     rword = 6'd33 - {1'b0, np_ch[4:0]};
      default:  rword = '0;
    endcase
  end

  assign enc_start = (st == P_ENC) && !enc_busy && !enc_done && (c == 8'd0);

  cluster_encoder #(.CHANNELS(CH_PER_CHIP), .MAX_CL(MAX_SPP_CL)) u_enc (
    .clk, .rst_n, .start(enc_start), .hits(hitmap), .limit(cl_limit),
    .timeout_en(1'b0), .timeout(8'd0),
    .busy(enc_busy), .done(enc_done), .cl_n(enc_n), .trunc(enc_trunc),
    .rd_idx(enc_idx), .rd_cl(enc_cl));

  assign enc_idx = bk[5:0];

  logic [15:0] hdr [DSP_HDR_WORDS];
  assign hdr[0] = meta_l1id[rslot];
  assign hdr[1] = {e_flags, ev_l0id};
  assign hdr[2] = {meta_r[rslot], z_mode, 2'b00, ev_bcid};
  assign hdr[3] = {ev_pcn, n_daq};
  assign hdr[4] = {t_flag, m_cl, 8'h00};

  assign out_valid = (st == P_SEND) && !out_full;
  assign out_data  = (sk < 9'(DSP_HDR_WORDS)) ? hdr[sk[2:0]] : body[8'(sk - 9'(DSP_HDR_WORDS))];
  assign proc_done = (st == P_SEND) && !out_full && (sk + 9'd1 == 9'(DSP_HDR_WORDS) + {1'b0, wp});

  // body writes
  logic        bw_en;
  logic [15:0] bw_data;
  logic [7:0]  bw_addr;
  always_ff @(posedge clk) if (bw_en) body[bw_addr] <= bw_data;

  always_comb begin
    bw_en   = 1'b0;
    bw_addr = wp;
    bw_data = '0;
    case (st)
      P_EMIT: begin
        bw_en = 1'b1;
        if (ek == 3'd0) bw_data = {6'b0, run_len, run_addr};
        else            bw_data = {(3'(2*ek - 1) < run_len) ? run_val[3'(2*ek - 1)] : 8'h00,
                                   run_val[3'(2*ek - 2)]};
      end
      P_L1T: if (bk != {1'b0, m_cl} && bk[0]) begin
        bw_en = 1'b1; bw_data = {enc_cl, lo_byte};
      end else if (bk == {1'b0, m_cl} && bk[0]) begin
        bw_en = 1'b1; bw_data = {8'h00, lo_byte};
      end
      P_NP: if (bk != np_n && bk[0]) begin
        bw_en = 1'b1; bw_data = {amp_np(), lo_byte};
      end else if (bk == np_n && bk[0]) begin
        bw_en = 1'b1; bw_data = {8'h00, lo_byte};
      end
      default: ;
    endcase
  end

  function automatic logic [7:0] amp_np();
    return rdw[8*np_ch[6:5] +: 8];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; rslot <= '0; c <= '0; run_len <= '0; run_addr <= '0;
      scan_end <= 1'b0; ek <= '0; n_daq <= '0; hitmap <= '0; hk <= '0;
      m_cl <= '0; t_flag <= 1'b0; bk <= '0; np_n <= '0; lo_byte <= '0;
      wp <= '0; sk <= '0; e_flags <= '0; ev_l0id <= '0; ev_bcid <= '0; ev_pcn <= '0;
      l0id_err <= 1'b0; n_l0id_err <= '0;
      for (int i = 0; i < MAX_DAQ_CL_LEN; i++) run_val[i] <= '0;
    end else if (l1_reset) begin
      st <= P_IDLE; rslot <= '0; l0id_err <= 1'b0; n_l0id_err <= '0;
    end else begin
      case (st)
        P_IDLE: if (dcount != 0) begin
          c  <= '0;
          wp <= '0;
          st <= P_HDRCHK;
        end
        P_HDRCHK: begin
          if (c[0] == 1'b0) begin
            ev_l0id <= rdw[11:0];
            ev_bcid <= rdw[27:16];
            if (rdw[1:0] != meta_info[rslot][1:0]) begin
              l0id_err   <= 1'b1;
              n_l0id_err <= n_l0id_err + 1'b1;
            end
            c <= 8'd1;
          end else begin
            e_flags  <= rdw[27:24];
            ev_pcn   <= rdw[7:0];
            c        <= '0;
            run_len  <= '0;
            n_daq    <= '0;
            scan_end <= 1'b0;
            st       <= z_mode ? P_HITS : P_SCAN;
            hk       <= '0;
          end
        end
        P_SCAN: begin
          if (zs_hit && run_len != 3'(MAX_DAQ_CL_LEN)) begin
            if (run_len == 0) run_addr <= c[6:0];
            run_val[run_len] <= zs_val;
            run_len <= run_len + 1'b1;
            c <= c + 1'b1;
            if (c == 8'd127) begin
              scan_end <= 1'b1;
              ek <= '0;
              st <= P_EMIT;
            end
          end else if (zs_hit) begin
            ek <= '0;
            st <= P_EMIT;                // full run, channel c starts the next
          end else begin
            c <= c + 1'b1;
            if (run_len != 0) begin
              ek <= '0;
              st <= P_EMIT;
              scan_end <= (c == 8'd127);
            end else if (c == 8'd127) begin
              st <= P_HITS;
              hk <= '0;
            end
          end
        end
        P_EMIT: begin
          wp <= wp + 1'b1;
          if ({1'b0, ek} == (({1'b0, run_len} + 4'd1) >> 1)) begin
            run_len <= '0;
            if (n_daq != 8'hFF) n_daq <= n_daq + 1'b1;
            if (scan_end) begin
              st <= P_HITS;
              hk <= '0;
            end else begin
              st <= P_SCAN;
            end
          end else begin
            ek <= ek + 1'b1;
          end
        end
        P_HITS: begin
          hitmap[32*hk +: 32] <= rdw;
          hk <= hk + 1'b1;
          if (hk == 2'd3) begin
            st <= P_ENC;
            c  <= '0;
          end
        end
        P_ENC: begin
          c <= 8'd1;
          if (enc_done) begin
            m_cl   <= enc_n;
            t_flag <= enc_trunc;
            bk     <= '0;
            st     <= P_L1T;
          end
        end
        P_L1T: begin
          if (bk == {1'b0, m_cl}) begin
            if (bk[0]) wp <= wp + 1'b1;
            bk   <= '0;
            np_n <= z_mode ? 8'd128 : ((np_count > 8'd128) ? 8'd128 : np_count);
            st   <= P_NP;
          end else begin
            if (!bk[0]) lo_byte <= enc_cl;
            else        wp <= wp + 1'b1;
            bk <= bk + 1'b1;
          end
        end
        P_NP: begin
          if (bk == np_n) begin
            if (bk[0]) wp <= wp + 1'b1;
            sk <= '0;
            st <= P_SEND;
          end else begin
            if (!bk[0]) lo_byte <= amp_np();
            else        wp <= wp + 1'b1;
            bk <= bk + 1'b1;
          end
        end
        P_SEND: if (!out_full) begin
          sk <= sk + 1'b1;
          if (proc_done) begin
            st    <= P_IDLE;
            rslot <= rslot + 1'b1;
          end
        end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
