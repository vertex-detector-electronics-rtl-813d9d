// spp_l1t_tx: sender of one chip's L1 trigger data to the L1 trigger link
// FPGA over the 8-bit parallel bus.
//
// For each event it sends, one byte per clock with tx_valid:
//   byte 1  : L0ID<7..0>
//   byte 2  : Error<1..0> BCID<1..0> L0ID<11..8>
//   byte 3  : T N<6..0>          (truncation flag, number of clusters)
//   byte 4..N+3 : S Cluster_Address<6..0>
// The clusters are read from the cluster encoder's list.  Error<1..0> is
// left "to be defined" by the board description; here Error<0> is the OR
// of the chip's four PCN synchronisation error bits and Error<1> is set
// when the formatter saw an event start too early (overrun).
//
// Timing: start is taken while busy is low; the first byte is on the bus
// in the second clock after start, and an event takes N+3 consecutive
// clocks.  There is no back pressure
// on this bus: the board description generates no throttle here.
module spp_l1t_tx
  import l1_pkg::*;
#(
  parameter int unsigned MAX_CL = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [11:0]           l0id,
  input  logic [1:0]            bcid_lsb,
  input  logic [1:0]            error,
  input  logic [6:0]            n,
  input  logic                  trunc,
  output logic [$clog2(MAX_CL)-1:0] rd_idx,
  input  cluster_t              rd_cl,
  output logic                  busy,
  output logic [7:0]            tx_data,
  output logic                  tx_valid
);
  logic [7:0] idx;     // byte being sent, 0-based
  logic [11:0] l0id_q;
  logic [1:0]  bcid_q, err_q;
  logic [6:0]  n_q;
  logic        t_q;

  // cluster k is sent as byte k + 3
  assign rd_idx = ($clog2(MAX_CL))'(idx - 8'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      idx      <= '0;
      tx_valid <= 1'b0;
      tx_data  <= '0;
      l0id_q   <= '0;
      bcid_q   <= '0;
      err_q    <= '0;
      n_q      <= '0;
      t_q      <= 1'b0;
    end else begin
      tx_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          idx    <= '0;
          l0id_q <= l0id;
          bcid_q <= bcid_lsb;
          err_q  <= error;
          n_q    <= n;
          t_q    <= trunc;
        end
      end else begin
        tx_valid <= 1'b1;
        case (idx)
          8'd0:    tx_data <= l0id_q[7:0];
          8'd1:    tx_data <= {err_q, bcid_q, l0id_q[11:8]};
          8'd2:    tx_data <= {t_q, n_q};
          default: tx_data <= rd_cl;
        endcase
        if (idx == 8'd2 + {1'b0, n_q}) busy <= 1'b0;
        idx <= idx + 1'b1;
      end
    end
  end
endmodule
