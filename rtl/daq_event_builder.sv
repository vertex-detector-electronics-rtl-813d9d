// daq_event_builder: event assembly in the DAQ link FPGA.
//
// Reads the event fragments of the N DSPs from their 16-bit input FIFOs
// (layout in dsp_pkg).  The five header words of all N FIFOs are taken
// together; the builder checks that the 16-bit L1IDs, L0IDs, BCIDs and
// PCNs agree (sync error otherwise), collects the 4-bit synchronisation
// flags E of every chip (64 bits), the truncation flags T, R and Z, and
// sums the cluster counts.  Then the bodies are read DSP by DSP and
// rewritten as 16-bit half words, two per 32-bit word (first in bits
// 15..0):
//   DAQ cluster head : 0 len<2..0> 0 dsp<3..0> addr<6..0>  (12-bit channel)
//   cluster data     : copied, two 8-bit values per half word
//   L1T cluster      : 000 S 0 dsp<3..0> addr<6..0>  (13-bit word)
//   raw samples      : copied
// L1 trigger clusters beyond the ECS limit (8 bits) are dropped and the
// global truncation flag GT is set.  The complete event is written to the
// output FIFO as seven header words and the data:
//   0 : L1ID<31..0>  (own 32-bit counter, first event after reset = 1)
//   1 : L0ID<11..0> BCID<11..0> PCN<7..0>
//   2 : E of chips 15..8        3 : E of chips 7..0
//   4 : LinkID<15..0> BoardNo<7..0> R Z GT SyncErr DT 000
//   5 : NDAQ<11..0> NL1T<11..0> 00000000
//   6 : T<15..0> Size<15..0>  (data words that follow)
// and its length is queued for the link sender.  Data beyond 504 words
// are dropped, the event's data-truncation bit DT and the sticky
// stage_ovf are set, so that header and data
// always fit the 512-word output FIFO (a Z-mode event, 16 x 128 raw
// samples, is larger than that).  An event is written only when the
// output FIFO has room for all of it (out_free; the FPGA forces it to 0
// while its length queue is full).
//
// The field list follows the board description (its transport format is
// still open there); the word layout is this design's choice.
module daq_event_builder #(
  parameter int unsigned N      = 16,
  parameter int unsigned OUT_AW = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 l1_reset,
  input  logic                 l1id_reset,
  input  logic [15:0]          link_id,
  input  logic [7:0]           board_no,
  input  logic [7:0]           limit,
  input  logic [7:0]           np_count,
  input  logic [N-1:0][15:0]   in_data,
  input  logic [N-1:0]         in_empty,
  output logic [N-1:0]         in_rd,
  output logic                 out_wr,
  output logic [31:0]          out_data,
  input  logic [OUT_AW-1:0]    out_free,
  output logic                 len_wr,
  output logic [15:0]          len_data,
  output logic [31:0]          l1id32,
  output logic [31:0]          n_events,
  output logic [31:0]          n_sync_err,
  output logic [31:0]          n_truncated,
  output logic                 stage_ovf
);
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned STAGE = 512;
  // at most STAGE - 8 data words, so that header + data fit the 512-word
  // output FIFO
  localparam int unsigned STAGE_MAX = STAGE - 8;

  typedef enum logic [3:0] {D_HDR, D_DAQH, D_DAQD, D_L1T, D_NP, D_NEXT, D_FLUSH,
                            D_WAIT, D_OHDR, D_DATA} dstate_t;
  dstate_t st;

  logic [2:0]        hw;
  logic [SW-1:0]     dsp;
  logic [N-1:0][7:0] ncl;
  logic [N-1:0][6:0] mcl;
  logic [N-1:0]      tfl;
  logic [63:0]       eflags;
  logic [11:0]       l0id, bcid;
  logic [7:0]        pcn;
  logic              r_f, z_f, gt, serr, dtr;
  logic [11:0]       ndaq, nl1t;
  logic [7:0]        cl_left;
  logic [2:0]        d_left;
  logic [6:0]        m_left;
  logic              sub;
  logic [7:0]        np_left;
  logic [15:0]       cur;
  logic [15:0]       lo_half;
  logic [10:0]       hc;        // halves written
  logic [31:0]       stage [STAGE];
  logic [9:0]        wr_i;
  logic [15:0]       size;
  logic [2:0]        oh;

  assign cur  = in_data[dsp];
  assign size = (hc >= 11'(2 * STAGE_MAX)) ? 16'(STAGE_MAX) : ({6'b0, hc[10:1]} + 16'(hc[0]));

  // ---- half-word emission into the staging buffer
  logic        emit;
  logic [15:0] emit_h;
  always_comb begin
    emit   = 1'b0;
    emit_h = '0;
    case (st)
      D_DAQH: if (cl_left != 0 && !in_empty[dsp]) begin
        emit = 1'b1; emit_h = {1'b0, cur[9:7], 1'b0, 4'(dsp), cur[6:0]};
      end
      D_DAQD, D_NP: if (!in_empty[dsp] && (st == D_NP ? np_left != 0 : 1'b1)) begin
        emit = 1'b1; emit_h = cur;
      end
      D_L1T: if (m_left != 0 && !in_empty[dsp] && nl1t < {4'b0, limit}) begin
        emit = 1'b1;
        emit_h = sub ? {3'b0, cur[15], 1'b0, 4'(dsp), cur[14:8]}
                     : {3'b0, cur[7],  1'b0, 4'(dsp), cur[6:0]};
      end
      D_FLUSH: if (hc[0]) begin
        emit = 1'b1; emit_h = '0;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (emit && hc[0] && hc < 11'(2 * STAGE_MAX)) stage[hc[9:1]] <= {emit_h, lo_half};
  end

  // ---- FIFO reads
  always_comb begin
    in_rd = '0;
    case (st)
      D_HDR:  if (in_empty == '0) in_rd = '1;
      D_DAQH: if (cl_left != 0 && !in_empty[dsp]) in_rd[dsp] = 1'b1;
      D_DAQD: if (!in_empty[dsp]) in_rd[dsp] = 1'b1;
      D_L1T:  if (m_left != 0 && !in_empty[dsp] && (sub || m_left == 7'd1)) in_rd[dsp] = 1'b1;
      D_NP:   if (np_left != 0 && !in_empty[dsp]) in_rd[dsp] = 1'b1;
      default: ;
    endcase
  end

  logic [7:0] np_words;
  assign np_words = z_f ? 8'd64 : ((np_count > 8'd128) ? 8'd64 : ((np_count + 8'd1) >> 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_HDR; hw <= '0; dsp <= '0; ncl <= '0; mcl <= '0; tfl <= '0; eflags <= '0;
      l0id <= '0; bcid <= '0; pcn <= '0; r_f <= 1'b0; z_f <= 1'b0;
      gt <= 1'b0; serr <= 1'b0; dtr <= 1'b0; ndaq <= '0; nl1t <= '0; cl_left <= '0; d_left <= '0;
      m_left <= '0; sub <= 1'b0; np_left <= '0; lo_half <= '0; hc <= '0; wr_i <= '0;
      oh <= '0; out_wr <= 1'b0; out_data <= '0; len_wr <= 1'b0; len_data <= '0;
      l1id32 <= '0; n_events <= '0; n_sync_err <= '0; n_truncated <= '0; stage_ovf <= 1'b0;
    end else if (l1_reset) begin
      st <= D_HDR; hw <= '0; out_wr <= 1'b0; len_wr <= 1'b0; l1id32 <= '0;
      n_events <= '0; n_sync_err <= '0; n_truncated <= '0; stage_ovf <= 1'b0;
    end else begin
      out_wr <= 1'b0;
      len_wr <= 1'b0;
      if (l1id_reset) l1id32 <= '0;
      if (emit) begin
        hc <= hc + 1'b1;
        if (!hc[0]) lo_half <= emit_h;
        if (hc >= 11'(2 * STAGE_MAX)) begin stage_ovf <= 1'b1; dtr <= 1'b1; end
      end
      case (st)
        D_HDR: if (in_empty == '0) begin
          hw <= hw + 1'b1;
          case (hw)
            3'd0: begin
              serr   <= 1'b0;
              r_f    <= 1'b0;
              for (int i = 0; i < N; i++) if (in_data[i] != in_data[0]) serr <= 1'b1;
            end
            3'd1: begin
              l0id <= in_data[0][11:0];
              for (int i = 0; i < N; i++) begin
                eflags[4*i +: 4] <= in_data[i][15:12];
                if (in_data[i][11:0] != in_data[0][11:0]) serr <= 1'b1;
              end
            end
            3'd2: begin
              bcid <= in_data[0][11:0];
              z_f  <= in_data[0][14];
              for (int i = 0; i < N; i++) begin
                if (in_data[i][15]) r_f <= 1'b1;
                if (in_data[i][11:0] != in_data[0][11:0]) serr <= 1'b1;
              end
            end
            3'd3: begin
              logic [11:0] s;
              s = '0;
              pcn <= in_data[0][15:8];
              for (int i = 0; i < N; i++) begin
                ncl[i] <= in_data[i][7:0];
                s = s + 12'(in_data[i][7:0]);
                if (in_data[i][15:8] != in_data[0][15:8]) serr <= 1'b1;
              end
              ndaq <= s;
            end
            default: begin
              for (int i = 0; i < N; i++) begin
                tfl[i] <= in_data[i][15];
                mcl[i] <= in_data[i][14:8];
              end
              hw      <= '0;
              dsp     <= '0;
              nl1t    <= '0;
              gt      <= 1'b0;
              dtr     <= 1'b0;
              hc      <= '0;
              cl_left <= ncl[0];
              st      <= D_DAQH;
            end
          endcase
        end
        D_DAQH: begin
          if (cl_left == 0) begin
            m_left <= mcl[dsp];
            sub    <= 1'b0;
            st     <= D_L1T;
          end else if (!in_empty[dsp]) begin
            d_left <= 3'(({1'b0, cur[9:7]} + 4'd1) >> 1);
            if (cur[9:7] == 3'd0) cl_left <= cl_left - 1'b1;
            else                  st <= D_DAQD;
          end
        end
        D_DAQD: if (!in_empty[dsp]) begin
          d_left <= d_left - 1'b1;
          if (d_left == 3'd1) begin
            cl_left <= cl_left - 1'b1;
            st      <= D_DAQH;
          end
        end
        D_L1T: begin
          if (m_left == 0) begin
            np_left <= np_words;
            st      <= D_NP;
          end else if (!in_empty[dsp]) begin
            m_left <= m_left - 1'b1;
            sub    <= !sub;
            if (nl1t < {4'b0, limit}) nl1t <= nl1t + 1'b1;
            else                      gt   <= 1'b1;
          end
        end
        D_NP: begin
          if (np_left == 0) st <= D_NEXT;
          else if (!in_empty[dsp]) np_left <= np_left - 1'b1;
        end
        D_NEXT: begin
          if (dsp == SW'(N - 1)) begin
            st <= D_FLUSH;
          end else begin
            dsp     <= dsp + 1'b1;
            cl_left <= ncl[dsp + 1'b1];
            st      <= D_DAQH;
          end
        end
        D_FLUSH: st <= D_WAIT;
        D_WAIT: if (16'(out_free) >= size + 16'd7) begin
          oh <= '0;
          st <= D_OHDR;
          l1id32 <= l1id32 + 1'b1;
        end
        D_OHDR: begin
          out_wr <= 1'b1;
          oh     <= oh + 1'b1;
          case (oh)
            3'd0: out_data <= l1id32;
            3'd1: out_data <= {l0id, bcid, pcn};
            3'd2: out_data <= eflags[63:32];
            3'd3: out_data <= eflags[31:0];
            3'd4: out_data <= {link_id, board_no, r_f, z_f, gt, serr, dtr, 3'b0};
            3'd5: out_data <= {ndaq, nl1t, 8'b0};
            default: out_data <= {16'(tfl), size};
          endcase
          if (oh == 3'd6) begin
            wr_i <= '0;
            if (size == 0) begin
              st       <= D_HDR;
              len_wr   <= 1'b1;
              len_data <= 16'd7;
              n_events <= n_events + 1;
              if (serr) n_sync_err <= n_sync_err + 1;
              if (gt) n_truncated <= n_truncated + 1;
            end else begin
              st <= D_DATA;
            end
          end
        end
        D_DATA: begin
          out_wr   <= 1'b1;
          out_data <= stage[wr_i[8:0]];
          wr_i     <= wr_i + 1'b1;
          if (16'(wr_i) + 16'd1 == size) begin
            st       <= D_HDR;
            len_wr   <= 1'b1;
            len_data <= size + 16'd7;
            n_events <= n_events + 1;
            if (serr) n_sync_err <= n_sync_err + 1;
            if (gt) n_truncated <= n_truncated + 1;
          end
        end
        default: st <= D_HDR;
      endcase
    end
  end
endmodule
