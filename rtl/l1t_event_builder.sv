// l1t_event_builder: event assembly in the L1 trigger link FPGA.
//
// Each of the N preprocessor FPGAs of the board delivers, per event, the
// three header bytes (L0ID<7..0>; Error, BCID<1..0>, L0ID<11..8>; T, N)
// and N cluster bytes {S, address<6..0>} into its input FIFO.  The
// builder takes the three header bytes of all N FIFOs together (waiting
// until none is empty), checks that all carry the same L0ID and BCID<1..0>,
// and then reads the clusters of FIFO 0, 1, ... in turn.  Each cluster is
// widened to 12 bits, {S, chip<3..0>, address<6..0>}, and placed in a
// 16-bit half word; two clusters form one 32-bit data word (first cluster
// in bits 15..0).  Clusters beyond the ECS limit (8 bits, up to 255) are
// read and dropped and the global truncation flag GT is set.  When all N
// FIFOs are done and the output FIFO has room, the event is written as
//   header 0 : L0ID<11..0> BCID<1..0> Error<1..0> LinkID<15..0>
//   header 1 : BoardNo<7..0> Nclusters<7..0> T<15..0> (T of each chip)
//   header 2 : GT 0..0 Size<15..0>  (number of data words that follow)
//   data     : Size words of two clusters each
// and its length (Size + 3) is pushed for the link sender.
// Error<0> is the OR of the chips' Error bits, Error<1> a mismatch of
// L0ID or BCID between chips.
//
// The field list follows the board description; the word layout of the
// header, the error bit meanings and the parallel header read are this
// design's choices (the description leaves the exact format open).
module l1t_event_builder #(
  parameter int unsigned N       = 16,
  parameter int unsigned OUT_AW  = 10    // width of the output FIFO count
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 l1_reset,
  input  logic [15:0]          link_id,
  input  logic [7:0]           board_no,
  input  logic [7:0]           limit,
  // input FIFOs
  input  logic [N-1:0][7:0]    in_data,
  input  logic [N-1:0]         in_empty,
  output logic [N-1:0]         in_rd,
  // output FIFO
  output logic                 out_wr,
  output logic [31:0]          out_data,
  input  logic [OUT_AW-1:0]    out_free,
  // event lengths for the link sender
  output logic                 len_wr,
  output logic [15:0]          len_data,
  // monitoring
  output logic [31:0]          n_events,
  output logic [31:0]          n_truncated,
  output logic [31:0]          n_sync_err
);
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [2:0] {S_H0, S_H1, S_H2, S_CL, S_WAIT, S_HDR, S_DATA} state_t;
  state_t st;

  logic [SW-1:0]  chip;
  logic [11:0]    l0id;
  logic [1:0]     bcid;
  logic [1:0]     err;
  logic [N-1:0]   tflag;
  logic [N-1:0][6:0] ncl;
  logic [6:0]     left;
  logic [7:0]     total;
  logic           gt;
  logic [1:0]     hdr_i;
  logic [6:0]     wr_i;
  logic [31:0]    stage [128];
  logic [15:0]    half_lo;
  logic [7:0]     byte_in;
  logic [15:0]    size;
  logic [8:0]     tot_p1;

  assign byte_in = in_data[chip];
  assign tot_p1  = {1'b0, total} + 9'd1;
  assign size    = 16'(tot_p1 >> 1);

  // Input FIFO reads: all together for header bytes, one for clusters.
  always_comb begin
    in_rd = '0;
    case (st)
      S_H0, S_H1, S_H2: if (in_empty == '0) in_rd = '1;
      S_CL:             if (left != 0 && !in_empty[chip]) in_rd[chip] = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (st == S_CL && left != 0 && !in_empty[chip] && total != limit && total[0])
      stage[total[7:1]] <= {4'b0, byte_in[7], 4'(chip), byte_in[6:0], half_lo};
    else if (st == S_CL && left == 0 && chip == SW'(N - 1) && total[0])
      stage[total[7:1]] <= {16'b0, half_lo};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_H0;
      chip <= '0; l0id <= '0; bcid <= '0; err <= '0; tflag <= '0; ncl <= '0;
      left <= '0; total <= '0; gt <= 1'b0; hdr_i <= '0; wr_i <= '0; half_lo <= '0;
      out_wr <= 1'b0; out_data <= '0; len_wr <= 1'b0; len_data <= '0;
      n_events <= '0; n_truncated <= '0; n_sync_err <= '0;
    end else if (l1_reset) begin
      st <= S_H0;
      out_wr <= 1'b0; len_wr <= 1'b0;
      n_events <= '0; n_truncated <= '0; n_sync_err <= '0;
    end else begin
      out_wr <= 1'b0;
      len_wr <= 1'b0;
      case (st)
        S_H0: if (in_empty == '0) begin
          l0id[7:0] <= in_data[0];
          err       <= '0;
          for (int i = 0; i < N; i++)
            if (in_data[i] != in_data[0]) err[1] <= 1'b1;
          st        <= S_H1;
        end
        S_H1: if (in_empty == '0) begin
          l0id[11:8] <= in_data[0][3:0];
          bcid       <= in_data[0][5:4];
          for (int i = 0; i < N; i++) begin
            if (in_data[i][7:6] != 2'b00) err[0] <= 1'b1;
            if (in_data[i][5:0] != in_data[0][5:0]) err[1] <= 1'b1;
          end
          st <= S_H2;
        end
        S_H2: if (in_empty == '0) begin
          for (int i = 0; i < N; i++) begin
            tflag[i] <= in_data[i][7];
            ncl[i]   <= in_data[i][6:0];
          end
          chip  <= '0;
          left  <= in_data[0][6:0];
          total <= '0;
          gt    <= 1'b0;
          st    <= S_CL;
        end
        S_CL: begin
          if (left != 0) begin
            if (!in_empty[chip]) begin
              left <= left - 1'b1;
              if (total != limit) begin
                total <= total + 1'b1;
                if (!total[0]) half_lo <= {4'b0, byte_in[7], 4'(chip), byte_in[6:0]};
              end else begin
                gt <= 1'b1;
              end
            end
          end else if (chip == SW'(N - 1)) begin
            st <= S_WAIT;
          end else begin
            chip <= chip + 1'b1;
            left <= ncl[chip + 1'b1];
          end
        end
        S_WAIT: if (16'(out_free) >= size + 16'd3) begin
          hdr_i <= '0;
          st    <= S_HDR;
        end
        S_HDR: begin
          out_wr <= 1'b1;
          case (hdr_i)
            2'd0:    out_data <= {l0id, bcid, err, link_id};
            2'd1:    out_data <= {board_no, total, 16'(tflag)};
            default: out_data <= {gt, 15'b0, size};
          endcase
          hdr_i <= hdr_i + 1'b1;
          if (hdr_i == 2'd2) begin
            wr_i <= '0;
            st   <= (size == 0) ? S_H0 : S_DATA;
            if (size == 0) begin
              len_wr   <= 1'b1;
              len_data <= 16'd3;
              n_events <= n_events + 1;
              if (gt) n_truncated <= n_truncated + 1;
              if (err[1]) n_sync_err <= n_sync_err + 1;
            end
          end
        end
        S_DATA: begin
          out_wr   <= 1'b1;
          out_data <= stage[wr_i];
          wr_i     <= wr_i + 1'b1;
          if (16'(wr_i) + 16'd1 == size) begin
            st       <= S_H0;
            len_wr   <= 1'b1;
            len_data <= size + 16'd3;
            n_events <= n_events + 1;
            if (gt) n_truncated <= n_truncated + 1;
            if (err[1]) n_sync_err <= n_sync_err + 1;
          end
        end
        default: st <= S_H0;
      endcase
    end
  end
endmodule
