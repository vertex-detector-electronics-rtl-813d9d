// spp_formatter: L1 buffer formatter of the synchronisation and
// preprocessor FPGA.
//
// One front-end chip sends four 8-bit streams (its four analog links after
// digitisation), 34 words per event each: two header words carrying the
// pipeline column number (PCN) as two 4-bit values (high nibble first, in
// bits 3..0 of the sample), then 32 channel amplitudes.  The formatter
// checks the PCN of every link against the PCN the fast-control FPGA sent
// with the event tag (one error bit per link, E<3..0>), joins the four
// links into 32-bit words (link k in bits 8k+7..8k) and writes the event
// into its 64-word slot of the L1 buffer:
//   word 0   : 0000 BCID<11..0> 0000 L0ID<11..0>
//   word 1   : 0000 E<3..0> 0..0 PCN<7..0>  (E in bits 27..24, PCN of
//              link 0 in bits 7..0)
//   word 2-33: one sample of each link, "ch 127 | ch 95 | ch 63 | ch 31"
//              first, "ch 96 | ch 64 | ch 32 | ch 0" last
//   word 34-37: hit map of link 0..3, bit b = channel 32k+b
// The slot is the count of events since L1_Reset, modulo 2048.  At the
// end of the event the 128-bit hit map, the tag and E are handed on to the
// cluster encoder (ev_valid).
//
// Timing: one L1 buffer write per clock, 38 writes per event: header and
// data words are written as the samples arrive, the hit words in the four
// clocks after the last sample.  Events must therefore start at least 38
// clocks apart.  The tag for an event must arrive no later than its first
// header word.  The word layout follows the board description; the order
// of samples on a link (channel 31 first), the nibble position and the
// single clock are this design's choices.
module spp_formatter
  import l1_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          l1_reset,
  input  logic [LINKS-1:0][7:0]         link_data,
  input  logic [LINKS-1:0]              link_valid,
  input  logic                          tag_valid,
  input  ev_tag_t                       tag,
  // pedestal / threshold configuration from the ECS
  input  logic                          ped_we,
  input  logic [6:0]                    ped_addr,
  input  logic [7:0]                    ped_wdata,
  input  logic [7:0]                    threshold,
  // L1 buffer write port
  output logic                          buf_we,
  output logic [BUF_ADDR_W-1:0]         buf_addr,
  output logic [31:0]                   buf_wdata,
  // to the cluster encoder
  output logic                          ev_valid,
  output logic [CH_PER_CHIP-1:0]        ev_hits,
  output ev_tag_t                       ev_tag,
  output logic [LINKS-1:0]              ev_err,
  output logic [PTR_W-1:0]              ev_slot,
  output logic                          overrun   // sticky: event too early
);
  ev_tag_t                 cur_tag, ref_tag;
  logic [5:0]              wc;        // word of the current frame
  logic [2:0]              hw;        // hit word being written, 4 = none
  logic [PTR_W-1:0]        slot;
  logic [LINKS-1:0][3:0]   pcn_hi;
  logic [LINKS-1:0]        err;
  logic [CH_PER_CHIP-1:0]  hits;
  logic [LINKS-1:0]        lane_hit;
  logic [LINKS-1:0][6:0]   lane_ch;
  logic                    v;

  assign v       = link_valid[0];
  assign ref_tag = tag_valid ? tag : cur_tag;

  for (genvar k = 0; k < LINKS; k++) begin : g_ch
    assign lane_ch[k] = 7'(32 * k + 33) - 7'(wc);
  end

  hit_detect #(.LANES(LINKS), .CHANNELS(CH_PER_CHIP)) u_hit (
    .clk, .ped_we, .ped_addr, .ped_wdata, .threshold,
    .sample(link_data), .channel(lane_ch), .hit(lane_hit));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_tag  <= '0;
      wc       <= '0;
      hw       <= 3'd4;
      slot     <= '0;
      pcn_hi   <= '0;
      err      <= '0;
      hits     <= '0;
      buf_we   <= 1'b0;
      buf_addr <= '0;
      buf_wdata<= '0;
      ev_valid <= 1'b0;
      ev_hits  <= '0;
      ev_tag   <= '0;
      ev_err   <= '0;
      ev_slot  <= '0;
      overrun  <= 1'b0;
    end else if (l1_reset) begin
      wc       <= '0;
      hw       <= 3'd4;
      slot     <= '0;
      buf_we   <= 1'b0;
      ev_valid <= 1'b0;
      overrun  <= 1'b0;
    end else begin
      buf_we   <= 1'b0;
      ev_valid <= 1'b0;
      if (tag_valid) cur_tag <= tag;

      if (v) begin
        if (hw != 3'd4) overrun <= 1'b1;
        buf_we <= 1'b1;
        buf_addr <= {slot, wc};
        if (wc == 6'd0) begin
          for (int k = 0; k < LINKS; k++) pcn_hi[k] <= link_data[k][3:0];
          buf_wdata <= {4'b0, ref_tag.bcid, 4'b0, ref_tag.l0id};
          wc <= wc + 1'b1;
        end else if (wc == 6'd1) begin
          logic [LINKS-1:0] e;
          for (int k = 0; k < LINKS; k++)
            e[k] = ({pcn_hi[k], link_data[k][3:0]} != ref_tag.pcn);
          err       <= e;
          buf_wdata <= {4'b0, e, 16'b0, pcn_hi[0], link_data[0][3:0]};
          ev_tag    <= '{l0id: ref_tag.l0id, bcid: ref_tag.bcid,
                         pcn: {pcn_hi[0], link_data[0][3:0]}};
          wc <= wc + 1'b1;
        end else begin
          buf_wdata <= link_data;
          for (int k = 0; k < LINKS; k++) hits[lane_ch[k]] <= lane_hit[k];
          if (wc == 6'(FRAME_WORDS - 1)) begin
            wc <= '0;
            hw <= 3'd0;
          end else begin
            wc <= wc + 1'b1;
          end
        end
      end else if (hw != 3'd4) begin
        buf_we    <= 1'b1;
        buf_addr  <= {slot, 6'(FRAME_WORDS) + 6'(hw)};
        buf_wdata <= hits[32*hw +: 32];
        if (hw == 3'd3) begin
          hw       <= 3'd4;
          slot     <= slot + 1'b1;
          ev_valid <= 1'b1;
          ev_hits  <= hits;
          ev_err   <= err;
          ev_slot  <= slot;
        end else begin
          hw <= hw + 1'b1;
        end
      end
    end
  end

  // All four links of one chip are sampled together.
  assert property (@(posedge clk) (link_valid == '0 || link_valid == '1));

endmodule
