// cluster_encoder: L1 trigger cluster encoding of one front-end chip.
//
// Turns the 128-bit hit map of an event into a list of clusters of at
// most two channels.  Each clock the lowest remaining hit channel i is
// taken: if channel i+1 is also a hit the pair forms a two-channel cluster
// (size bit S = 1) and both are removed, otherwise channel i alone forms a
// one-channel cluster.  Longer runs of hits so become several clusters.
// Each cluster is stored as {S, address<6..0>}; at most 64 can exist.
//
// Truncation: encoding stops, with the truncation flag T set, when hits
// remain but either the ECS cluster limit (7-bit, up to 64) has been
// reached or, with the time-out enabled, timeout clocks have passed since
// start.  With the time-out disabled only the limit truncates.
//
// Timing: start is taken while busy is low; one cluster per clock; done
// pulses in the clock after the last cluster is stored, with cl_n and
// trunc valid until the next start.  The list is read through rd_idx /
// rd_cl (combinational).  One cluster per clock and the time-out measured
// in clocks of encoding are this design's choices.
module cluster_encoder
  import l1_pkg::*;
#(
  parameter int unsigned CHANNELS = 128,
  parameter int unsigned MAX_CL   = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [CHANNELS-1:0]   hits,
  input  logic [6:0]            limit,
  input  logic                  timeout_en,
  input  logic [7:0]            timeout,
  output logic                  busy,
  output logic                  done,
  output logic [6:0]            cl_n,
  output logic                  trunc,
  input  logic [$clog2(MAX_CL)-1:0] rd_idx,
  output cluster_t              rd_cl
);
  logic [CHANNELS-1:0] mask;
  cluster_t            list [MAX_CL];
  logic [7:0]          tcnt;
  logic                found;
  logic [6:0]          low;

  // Lowest set bit of the remaining hit map.
  always_comb begin
    found = 1'b0;
    low   = '0;
    for (int i = CHANNELS - 1; i >= 0; i--)
      if (mask[i]) begin
        found = 1'b1;
        low   = 7'(i);
      end
  end

  assign rd_cl = list[rd_idx];

  always_ff @(posedge clk) begin
    if (busy && found && cl_n < limit && cl_n < 7'(MAX_CL) &&
        !(timeout_en && tcnt >= timeout))
      list[cl_n[$clog2(MAX_CL)-1:0]] <= '{s: (low != 7'(CHANNELS - 1)) && mask[low + 1'b1],
                                            addr: low};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask  <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      cl_n  <= '0;
      trunc <= 1'b0;
      tcnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          mask  <= hits;
          busy  <= 1'b1;
          cl_n  <= '0;
          trunc <= 1'b0;
          tcnt  <= '0;
        end
      end else begin
        tcnt <= tcnt + 1'b1;
        if (!found) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else if (cl_n >= limit || cl_n >= 7'(MAX_CL) ||
                     (timeout_en && tcnt >= timeout)) begin
          trunc <= 1'b1;
          busy  <= 1'b0;
          done  <= 1'b1;
        end else begin
          cl_n <= cl_n + 1'b1;
          mask[low] <= 1'b0;
          if (low != 7'(CHANNELS - 1)) mask[low + 1'b1] <= 1'b0;
        end
      end
    end
  end
endmodule
