// tb_velo_l1_board: end-to-end test of the complete L1 board at its full
// size (16 chips, default parameters).
//
// The testbench plays the parts around the board:
//  * TTC / readout supervisor: random L0 accepts with the bunch counter,
//    L1 decisions (accepts and rejects) in L0 order with random latency,
//    reset broadcasts; L0 accepts stop while the board throttles;
//  * front-end chips: for every event the emulator reads out, each chip
//    sends its PCN header and 32 samples on its four links after a fixed
//    latency; samples come from a hash of (event, chip, channel), so the
//    reference model can recompute them at any time; on some events one
//    link sends a wrong PCN;
//  * ECS: configuration, pedestal tables, link resets;
//  * both S-LINK cards: random LFF#, the URESET# / LDOWN# handshake.
// Every L1 trigger event (one per L0 accept) and every DAQ event (one per
// L1 accept) is compared word by word with a reference model of the
// whole chain: hit detection, cluster encoding with limit (and, in the
// time-out phase, a prefix check of each chip's cluster list), L1T event
// building with the global cluster limit, DSP zero suppression, L1 trigger
// re-encoding and raw samples, DAQ event building.
//
// The run is split into phases: normal data, cluster truncation, time-out
// truncation, SPP overload without time-out, Z (no-processing) mode, DAQ back pressure with throttle,
// link re-initialisation and reset broadcasts.  Each mechanism is counted
// and the test fails if any of them never happened.
module tb_velo_l1_board;
  import l1_pkg::*;

  localparam int NC = 16;
  localparam int FE_LAT = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // ------------------------------------------------------------------ DUT
  logic [7:2] brcst = '0;
  logic brcst_str1 = 0, l0_accept = 0, bcnt_str = 0, evcntres = 0, ttc_ready = 0;
  logic [11:0] bcnt = '0;
  logic [NC-1:0][LINKS-1:0][7:0] link_data = '0;
  logic [NC-1:0][LINKS-1:0] link_valid = '0;
  board_cfg_t cfg;
  ped_wr_t ped_wr = '0;
  ecs_cmd_t ecs_cmd = '0;
  logic [NC+2:0] init_done = '0;
  logic ecs_ready = 0;
  slink_out_t l1t_link, daq_link;
  slink_in_t l1t_in = '{lff_n: 1'b1, ldown_n: 1'b1};
  slink_in_t daq_in = '{lff_n: 1'b1, ldown_n: 1'b1};
  logic board_ready, throttle, fem_dv, tag_error, fem_ovf, daq_data_trunc;
  logic [NC-1:0][15:0] throttle_counts;
  logic [11:0] l0id;
  logic [3:0] fem_nib;
  logic [NC-1:0][LINKS-1:0] sync_err;
  logic [31:0] l1t_events, l1t_truncated, daq_events, daq_l1id, l1_accepts, l1_decisions;
  logic [31:0] l1t_sync_errs, l1t_sent, daq_sync_errs, daq_truncated, daq_sent;
  logic [NC-1:0] dsp_l0id_err, spp_overrun, spp_lost, spp_forced, dsp_throttle;
  logic [NC+1:0] l1t_fifo_ovf;
  logic [1:0] daq_fifo_ovf;
  logic [2*NC+6:0] ready_status;

  velo_l1_board dut (
    .clk, .rst_n, .brcst, .brcst_str1, .l0_accept, .bcnt, .bcnt_str, .evcntres, .ttc_ready,
    .link_data, .link_valid, .cfg, .ped_wr, .ecs_cmd, .init_done, .ecs_ready,
    .l1t_link, .l1t_link_in(l1t_in), .daq_link, .daq_link_in(daq_in),
    .board_ready, .throttle, .throttle_counts, .l0id, .fem_dv, .fem_nib, .sync_err,
    .l1t_events, .l1t_truncated, .daq_events, .daq_l1id, .dsp_l0id_err, .l1_accepts,
    .l1_decisions, .tag_error, .fem_ovf, .spp_overrun, .spp_lost, .spp_forced, .dsp_throttle,
    .l1t_fifo_ovf, .l1t_sync_errs, .l1t_sent, .daq_fifo_ovf, .daq_sync_errs,
    .daq_truncated, .daq_sent, .daq_data_trunc, .ready_status);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------- data patterns
  function automatic int unsigned hsh(input int unsigned a, input int unsigned b,
                                      input int unsigned c);
    int unsigned x;
    x = a * 32'h9E3779B1 ^ b * 32'h85EBCA77 ^ c * 32'hC2B2AE3D ^ 32'h27D4EB2F;
    x ^= x >> 15; x *= 32'h2C1B3C6D;
    x ^= x >> 12; x *= 32'h297A2D39;
    x ^= x >> 15;
    return x;
  endfunction

  function automatic logic [7:0] ped(input int chip, input int ch);
    return 8'(40 + hsh(chip, ch, 7) % 20);
  endfunction

  // event kinds: 0 quiet, 1 the first heavy_chips chips busy, 2 all busy
  int ev_kind [$];
  int ev_l0id [$], ev_bcid [$], ev_pcn [$];
  int ev_bad [$];          // -1, or chip*4+link that sends a wrong PCN
  int heavy1 = 15, heavy2 = 10;   // occupancy in percent of busy chips
  int heavy_chips = 4, quiet = 2;

  function automatic int occ(input int e, input int chip);
    case (ev_kind[e])
      1:       return (chip < heavy_chips) ? heavy1 : quiet;
      2:       return heavy2;
      default: return quiet;
    endcase
  endfunction

  function automatic logic [7:0] smp(input int e, input int chip, input int ch);
    int unsigned h = hsh(e, chip * 128 + ch, 1);
    if (int'(h % 1000) < occ(e, chip) * 10) return ped(chip, ch) + 8'(60 + (h >> 12) % 100);
    return ped(chip, ch) + 8'((h >> 12) % 6);
  endfunction

  function automatic logic [127:0] hits(input int e, input int chip);
    logic [127:0] h;
    for (int ch = 0; ch < 128; ch++)
      h[ch] = int'(smp(e, chip, ch)) > int'(ped(chip, ch)) + int'(cfg.hit_threshold);
    return h;
  endfunction

  // full cluster list of one chip (no limit); returns the bytes
  typedef logic [7:0] bytes_t [$];
  function automatic bytes_t clusters(input logic [127:0] h);
    bytes_t b;
    int c = 0;
    while (c < 128) begin
      if (h[c]) begin
        if (c < 127 && h[c+1]) begin b.push_back({1'b1, 7'(c)}); c += 2; end
        else begin b.push_back({1'b0, 7'(c)}); c++; end
      end else c++;
    end
    return b;
  endfunction

  function automatic logic [3:0] ev_e(input int e, input int chip);
    logic [3:0] x = '0;
    if (ev_bad[e] >= 0 && ev_bad[e] / 4 == chip) x[ev_bad[e] % 4] = 1'b1;
    return x;
  endfunction

  // ------------------------------------------------------ mechanism counts
  int n_l1a = 0, n_rej = 0, n_spp_trunc = 0, n_tmo_trunc = 0, n_l1t_gt = 0;
  int n_daq_gt = 0, n_z = 0, n_nz_after_z = 0, n_thr = 0, n_l1t_stall = 0, n_daq_stall = 0;
  int n_pcn_err = 0, n_daq_e = 0, n_l1reset = 0, n_r = 0, n_link_reset = 0, n_dt = 0;
  int n_ready_drop = 0, n_daq_zs = 0, n_l0reset = 0, n_forced = 0;
  bit seen_z = 0;

  // ------------------------------------------------------------ TTC side
  int  n_ev = 0;           // L0 accepts issued (global event index)
  int  l0cnt = 0;          // board's L0ID counter model
  bit  gen_on = 0;
  int  acc_pct = 25;       // percentage of accepting decisions
  int  gap_mean = 150;
  int  max_out = 8;
  int  fem_rd = 0;         // events read out by the emulator
  int  fr_done = 0;        // frames completely sent
  int  fr_end_t [$];
  int  phase_busy1 = 0, phase_busy2 = 0;
  int  n_thr_cycles = 0;

  task automatic pulse_bcnt(input logic [11:0] b);
    @(negedge clk); bcnt = b; bcnt_str = 1;
    @(negedge clk); bcnt_str = 0;
  endtask

  // L0 accepts
  initial begin
    forever begin
      @(negedge clk);
      if (gen_on && !throttle && (n_ev - fem_rd) < max_out &&
          ($urandom % gap_mean) == 0) begin
        int k;
        logic [11:0] b;
        b = 12'($urandom);
        l0cnt = (l0cnt + 1) % 4096;
        ev_l0id.push_back(l0cnt);
        ev_bcid.push_back(int'(b));
        ev_pcn.push_back(-1);
        k = int'($urandom % 100);
        ev_kind.push_back((k < phase_busy1) ? 1 : (k < phase_busy1 + phase_busy2) ? 2 : 0);
        // a wrong PCN on link 1..3 of chip 1..15 (link 0 carries the PCN
        // stored in the buffer header)
        ev_bad.push_back((($urandom % 40) == 0) ? int'((1 + $urandom % 15) * 4 + 1 + $urandom % 3) : -1);
        n_ev++;
        l0_accept = 1;
        @(negedge clk);
        l0_accept = 0;
        bcnt = b; bcnt_str = 1;
        @(negedge clk);
        bcnt_str = 0;
        repeat (2) @(negedge clk);
      end
    end
  end
  always @(negedge clk) if (throttle) n_thr_cycles++;

  // emulator readout -> PCN of the next event, schedule its frame
  int  fr_start [$];
  int  fr_ev [$];
  logic [3:0] hi_nib;
  bit  nib_hi = 1;
  always @(negedge clk) begin
    if (fem_dv) begin
      if (nib_hi) hi_nib = fem_nib;
      else begin
        ev_pcn[fem_rd] = int'({hi_nib, fem_nib});
        fr_start.push_back(cyc + FE_LAT + 4);
        fr_ev.push_back(fem_rd);
        fem_rd++;
      end
      nib_hi = !nib_hi;
    end
  end

  // front-end links
  int fw = -1, fe = 0;
  always @(negedge clk) begin
    if (fw < 0 && fr_start.size() > 0 && cyc >= fr_start[0]) begin
      fw = 0; fe = fr_ev[0];
      void'(fr_start.pop_front()); void'(fr_ev.pop_front());
    end
    if (fw >= 0) begin
      for (int i = 0; i < NC; i++)
        for (int k = 0; k < LINKS; k++) begin
          logic [7:0] p;
          p = 8'(ev_pcn[fe]);
          if (ev_bad[fe] == i * 4 + k) p = ~p;
          link_valid[i][k] = 1'b1;
          if (fw == 0)      link_data[i][k] = {4'b0, p[7:4]};
          else if (fw == 1) link_data[i][k] = {4'b0, p[3:0]};
          else              link_data[i][k] = smp(fe, i, 32 * k + 31 - (fw - 2));
        end
      fw++;
      if (fw == 34) begin
        fw = -1;
        fr_end_t.push_back(cyc);
        fr_done++;
      end
    end else begin
      link_valid = '0;
      link_data = '0;
    end
  end

  // L1 decisions, in event order
  int dec_n = 0;           // decisions sent
  int acc_ev [$];          // accepted events, in order
  int acc_l1id [$];
  bit acc_r [$];
  int l1id_model = 0;
  bit r_model = 1;
  bit dec_on = 1;
  initial begin
    forever begin
      @(negedge clk);
      if (dec_on && dec_n < fr_done && cyc > fr_end_t[dec_n] + 10) begin
        bit a;
        logic [2:0] t;
        a = int'($urandom % 100) < acc_pct;
        t = a ? 3'(1 + $urandom % 7) : 3'd0;
        repeat ($urandom % 40) @(negedge clk);
        brcst = {1'b1, t, 2'(ev_l0id[dec_n])};
        brcst_str1 = 1;
        @(negedge clk);
        brcst_str1 = 0;
        if (a) begin
          l1id_model++;
          acc_ev.push_back(dec_n);
          acc_l1id.push_back(l1id_model);
          acc_r.push_back(r_model);
          r_model = 0;
          n_l1a++;
        end else n_rej++;
        dec_n++;
        repeat (3) @(negedge clk);
      end
    end
  end

  task automatic reset_cmd(input bit l0r, input bit l1r, input bit l1idr);
    @(negedge clk);
    brcst = {2'b01, 1'b0, l1idr, l1r, l0r};
    brcst_str1 = 1;
    @(negedge clk);
    brcst_str1 = 0;
    repeat (5) @(negedge clk);
  endtask

  // ------------------------------------------------------------ S-LINKs
  int lff_l1t_pct = 10, lff_daq_pct = 10;
  always @(negedge clk) begin
    l1t_in.lff_n = int'($urandom % 100) >= lff_l1t_pct;
    daq_in.lff_n = int'($urandom % 100) >= lff_daq_pct;
    if (!l1t_in.lff_n) n_l1t_stall++;
    if (!daq_in.lff_n) n_daq_stall++;
  end
  initial forever begin
    @(negedge clk);
    if (!l1t_link.ureset_n && l1t_in.ldown_n) begin
      repeat (3) @(negedge clk); l1t_in.ldown_n = 0;
      repeat (30) @(negedge clk); l1t_in.ldown_n = 1;
    end
  end
  initial forever begin
    @(negedge clk);
    if (!daq_link.ureset_n && daq_in.ldown_n) begin
      repeat (3) @(negedge clk); daq_in.ldown_n = 0;
      repeat (30) @(negedge clk); daq_in.ldown_n = 1;
    end
  end
  bit ready_was = 0;
  always @(negedge clk) begin
    if (ready_was && !board_ready) n_ready_drop++;
    ready_was = board_ready;
  end

  // ------------------------------------------------- L1 trigger checker
  bit tmo_mode = 0;
  int l1t_rx = 0;          // L1T events checked
  logic [31:0] l1w [$];
  always @(negedge clk) if (!l1t_link.uwen_n) begin
    l1w.push_back(l1t_link.ud);
    if (l1w.size() >= 3 && l1w.size() == 3 + int'(l1w[2][15:0])) begin
      check_l1t();
      l1w.delete();
    end
  end

  task automatic check_l1t();
    int e = l1t_rx;
    bytes_t full [NC];
    logic [15:0] halves [$];
    logic [15:0] tf = '0;
    bit gt = 0, err0 = 0, tmo = 0, frc = 0;
    int nl = 0;
    l1t_rx++;
    if (e >= n_ev) begin chk(0, "L1T event without L0 accept"); return; end
    for (int i = 0; i < NC; i++) begin
      full[i] = clusters(hits(e, i));
      if (ev_e(e, i) != 0) err0 = 1;
    end
    chk(l1w[0] == {12'(ev_l0id[e]), 2'(ev_bcid[e]), 1'b0, err0, cfg.l1t_link_id},
        $sformatf("L1T ev %0d h0 %08x", e, l1w[0]));
    if (err0) n_pcn_err++;
    if (!tmo_mode) begin
      for (int i = 0; i < NC; i++) begin
        int n = full[i].size();
        if (n > int'(cfg.spp_cl_limit)) begin n = int'(cfg.spp_cl_limit); tf[i] = 1; end
        for (int k = 0; k < n; k++) begin
          if (nl < int'(cfg.l1t_cl_limit)) begin
            halves.push_back({4'b0, full[i][k][7], 4'(i), full[i][k][6:0]}); nl++;
          end else gt = 1;
        end
      end
      if (tf != 0) n_spp_trunc++;
      if (gt) n_l1t_gt++;
      chk(l1w[1] == {cfg.board_no, 8'(nl), tf}, $sformatf("L1T ev %0d h1 %08x exp %08x", e,
          l1w[1], {cfg.board_no, 8'(nl), tf}));
      chk(l1w[2] == {gt, 15'b0, 16'((nl + 1) / 2)}, $sformatf("L1T ev %0d h2 %08x", e, l1w[2]));
      for (int w = 0; w < (nl + 1) / 2 && 3 + w < l1w.size(); w++)
        chk(l1w[3 + w] == {(2*w+1 < nl) ? halves[2*w+1] : 16'h0, halves[2*w]},
            $sformatf("L1T ev %0d data %0d", e, w));
    end else begin
      // time-out: each chip's list must be a prefix of its full list
      int got [NC];
      int n = int'(l1w[1][23:16]);
      for (int i = 0; i < NC; i++) got[i] = 0;
      chk(l1w[2][31] == 1'b0, "no GT in time-out phase");
      for (int k = 0; k < n; k++) begin
        logic [15:0] hw = l1w[3 + k / 2][16 * (k % 2) +: 16];
        int i = int'(hw[10:7]);
        chk(got[i] < full[i].size() && hw == {4'b0, full[i][got[i]][7], 4'(i), full[i][got[i]][6:0]},
            $sformatf("L1T ev %0d time-out prefix chip %0d", e, i));
        got[i]++;
      end
      for (int i = 0; i < NC; i++) begin
        chk(l1w[1][i] == (got[i] < full[i].size()), $sformatf("L1T ev %0d T chip %0d", e, i));
        if (got[i] < full[i].size() && got[i] < int'(cfg.spp_cl_limit)) tmo = 1;
        if (got[i] == 0 && full[i].size() > 0) frc = 1;
      end
      if (tmo && cfg.spp_timeout_en) n_tmo_trunc++;
      if (frc && !cfg.spp_timeout_en) n_forced++;
    end
  endtask

  // ----------------------------------------------------------- DAQ checker
  int daq_rx = 0;
  int daq_l1id_model = 0;
  logic [31:0] dqw [$];
  always @(negedge clk) if (!daq_link.uwen_n) begin
    dqw.push_back(daq_link.ud);
    if (dqw.size() >= 7 && dqw.size() == 7 + int'(dqw[6][15:0])) begin
      check_daq();
      dqw.delete();
    end
  end

  task automatic check_daq();
    int a = daq_rx, e, id;
    logic [15:0] halves [$];
    logic [63:0] ef = '0;
    logic [15:0] tf = '0;
    int ndaq = 0, nl1t = 0, size;
    bit gt = 0, dt = 0, z = cfg.z_mode;
    daq_rx++;
    daq_l1id_model++;
    if (a >= acc_ev.size()) begin chk(0, "DAQ event without L1 accept"); return; end
    e = acc_ev[a]; id = acc_l1id[a];
    for (int i = 0; i < NC; i++) begin
      logic [7:0] s [128];
      logic [127:0] h;
      bytes_t b;
      int m;
      for (int ch = 0; ch < 128; ch++) s[ch] = smp(e, i, ch);
      ef[4*i +: 4] = ev_e(e, i);
      if (!z) begin
        int c = 0;
        while (c < 128) begin
          if (int'(s[c]) > int'(ped(i, c)) + int'(cfg.zs_threshold)) begin
            logic [7:0] v [$];
            int st = c;
            while (c < 128 && v.size() < 7 && int'(s[c]) > int'(ped(i, c)) + int'(cfg.zs_threshold)) begin
              v.push_back(s[c] - ped(i, c)); c++;
            end
            halves.push_back({1'b0, 3'(v.size()), 1'b0, 4'(i), 7'(st)});
            for (int k = 0; k < v.size(); k += 2)
              halves.push_back({(k + 1 < v.size()) ? v[k+1] : 8'h00, v[k]});
            ndaq++;
          end else c++;
        end
      end
      for (int ch = 0; ch < 128; ch++) h[ch] = int'(s[ch]) > int'(ped(i, ch)) + int'(cfg.hit_threshold);
      b = clusters(h);
      m = b.size();
      if (m > int'(cfg.spp_cl_limit)) begin m = int'(cfg.spp_cl_limit); tf[i] = 1; end
      for (int k = 0; k < m; k++) begin
        if (nl1t < int'(cfg.l1t_cl_limit)) begin
          halves.push_back({3'b0, b[k][7], 1'b0, 4'(i), b[k][6:0]}); nl1t++;
        end else gt = 1;
      end
      begin
        int n = z ? 128 : ((cfg.np_count > 128) ? 128 : int'(cfg.np_count));
        int f = z ? 0 : 4 * (id % 32);
        for (int k = 0; k < n; k += 2)
          halves.push_back({(k + 1 < n) ? s[(f + k + 1) % 128] : 8'h00, s[(f + k) % 128]});
      end
    end
    if (halves.size() % 2) halves.push_back(16'h0);
    size = halves.size() / 2;
    if (size > 504) begin size = 504; dt = 1; end
    if (gt) n_daq_gt++;
    if (dt) n_dt++;
    if (z) begin n_z++; seen_z = 1; end else if (seen_z) n_nz_after_z++;
    if (ndaq > 0) n_daq_zs++;
    if (ef != 0) n_daq_e++;
    if (acc_r[a]) n_r++;
    chk(dqw[0] == 32'(daq_l1id_model), $sformatf("DAQ L1ID %0d vs %0d", dqw[0], daq_l1id_model));
    chk(dqw[1] == {12'(ev_l0id[e]), 12'(ev_bcid[e]), 8'(ev_pcn[e])}, $sformatf("DAQ ev %0d h1", e));
    chk(dqw[2] == ef[63:32] && dqw[3] == ef[31:0], $sformatf("DAQ ev %0d E flags", e));
    chk(dqw[4] == {cfg.daq_link_id, cfg.board_no, acc_r[a], z, gt, 1'b0, dt, 3'b0},
        $sformatf("DAQ ev %0d h4 %08x", e, dqw[4]));
    chk(dqw[5] == {12'(ndaq), 12'(nl1t), 8'b0}, $sformatf("DAQ ev %0d h5 %08x vs %0d %0d", e, dqw[5], ndaq, nl1t));
    chk(dqw[6] == {tf, 16'(size)}, $sformatf("DAQ ev %0d h6 %08x vs %04x %0d", e, dqw[6], tf, size));
    for (int w = 0; w < size && 7 + w < dqw.size(); w++)
      chk(dqw[7 + w] == {halves[2*w+1], halves[2*w]}, $sformatf("DAQ ev %0d data %0d", e, w));
  endtask

  // ----------------------------------------------------------- watchdog
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: ev %0d fem %0d frames %0d dec %0d l1t %0d daq %0d/%0d",
             n_ev, fem_rd, fr_done, dec_n, l1t_rx, daq_rx, acc_ev.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------- sequencing
  task automatic drain();
    gen_on = 0;
    while (!(fr_done == n_ev && dec_n == n_ev && l1t_rx == n_ev && daq_rx == acc_ev.size()))
      @(negedge clk);
    repeat (200) @(negedge clk);
  endtask

  task automatic run(input int n);
    int target = n_ev + n;
    gen_on = 1;
    while (n_ev < target) @(negedge clk);
    drain();
  endtask

  task automatic cfg_default();
    cfg = '0;
    cfg.hit_threshold  = 8'd30;
    cfg.spp_cl_limit   = 7'd64;
    cfg.spp_timeout_en = 1'b0;
    cfg.l1t_cl_limit   = 8'd255;
    cfg.l1t_link_id    = 16'hA11C;
    cfg.daq_link_id    = 16'hDA0C;
    cfg.board_no       = 8'd5;
    cfg.z_mode         = 1'b0;
    cfg.np_count       = 8'd8;
    cfg.derand_thr     = 4'd13;
    cfg.zs_threshold   = 8'd30;
    cfg.throttle_mask  = 16'hFFFF;
  endtask

  initial begin
    cfg_default();
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    chk(!board_ready, "not ready before the components");
    ttc_ready = 1; init_done = '1; ecs_ready = 1;
    repeat (10) @(negedge clk);
    chk(board_ready, "BOARD_READY after all components are ready");
    for (int i = 0; i < NC; i++)
      for (int ch = 0; ch < 128; ch++) begin
        @(negedge clk);
        ped_wr = '{we: 1'b1, chip: 4'(i), addr: 7'(ch), data: ped(i, ch)};
      end
    @(negedge clk); ped_wr = '0;

    // 1: normal data taking
    $display("phase 1 at %0d", cyc);
    phase_busy1 = 5; phase_busy2 = 5;
    run(300);
    chk(sync_err != '0 || n_pcn_err > 0, "PCN errors seen");

    // 2: cluster limits in SPP and L1T FPGA
    $display("phase 2 at %0d", cyc);
    cfg.spp_cl_limit = 7'd6; cfg.l1t_cl_limit = 8'd60;
    phase_busy1 = 30; phase_busy2 = 30;
    heavy1 = 35; heavy2 = 20;
    run(150);
    chk(spp_forced == '0, "no forced-empty events with the limits");
    heavy1 = 15; heavy2 = 10;

    // 3: time-out truncation
    $display("phase 3 at %0d", cyc);
    cfg_default();
    cfg.spp_timeout_en = 1'b1;
    tmo_mode = 1;
    heavy1 = 35;
    phase_busy1 = 60; phase_busy2 = 0;
    run(120);
    // busy events on chip 0 without the time-out: its encoding is slower
    // than the event spacing, its SPP sends some events empty to keep up
    // (one busy chip and the others empty, so that the L1T FPGA, reading
    // one cluster per clock, is not overloaded as well)
    $display("phase 3b at %0d", cyc);
    cfg.spp_timeout_en = 1'b0;
    heavy1 = 45; heavy_chips = 1; quiet = 0;
    phase_busy1 = 100;
    gap_mean = 5;
    run(80);
    chk(spp_forced != '0, "SPP forced-empty events flagged");
    gap_mean = 150;
    heavy1 = 15; heavy_chips = 4; quiet = 2;
    tmo_mode = 0;

    // 4: Z mode, then back to normal processing
    $display("phase 4 at %0d", cyc);
    cfg.z_mode = 1'b1;
    phase_busy1 = 10; phase_busy2 = 0;
    acc_pct = 50;
    run(60);
    cfg.z_mode = 1'b0;
    cfg.np_count = 8'd20;
    acc_pct = 25;
    run(60);

    // 5: DAQ link full for long periods -> back pressure -> throttle
    $display("phase 5 at %0d", cyc);
    n_thr_cycles = 0;
    lff_daq_pct = 90;
    acc_pct = 100;
    gap_mean = 60;
    run(60);
    chk(n_thr_cycles > 0, "throttle raised");
    lff_daq_pct = 10;
    acc_pct = 25;
    gap_mean = 150;
    chk(!throttle, "throttle released");

    // 6: link re-initialisation, reset broadcasts
    $display("phase 6 at %0d", cyc);
    @(negedge clk); ecs_cmd.l1t_link_reset = 1; ecs_cmd.daq_link_reset = 1;
    @(negedge clk); ecs_cmd = '0;
    n_link_reset++;
    repeat (200) @(negedge clk);
    run(40);
    // L1_Reset and L1ID_Reset: slots, L1IDs restart, R flag on next event
    reset_cmd(0, 1, 1);
    n_l1reset++;
    // the checkers work on event indices; only the L1IDs restart
    daq_l1id_model = 0; l1id_model = 0; r_model = 1;
    chk(daq_l1id == 0 && l1_accepts == 0, "L1_Reset clears the event counters");
    run(60);
    // L0_Reset with L0ID reset: L0ID restarts at 1
    reset_cmd(1, 0, 0);
    @(negedge clk); evcntres = 1; @(negedge clk); evcntres = 0;
    l0cnt = 0; n_l0reset++;
    repeat (50) @(negedge clk);
    chk(l0id == 0, "L0ID cleared");
    run(60);

    // ----------------------------------------------------------- results
    chk(l1t_rx == int'(l1t_sent), $sformatf("all L1T events received (%0d of %0d)", l1t_rx, l1t_sent));
    chk(daq_rx == int'(daq_sent), $sformatf("all DAQ events received (%0d of %0d)", daq_rx, daq_sent));
    chk(l1t_fifo_ovf == '0 && daq_fifo_ovf == '0 && !fem_ovf, "no FIFO overflow");
    chk(spp_overrun == '0 && spp_lost == '0 && !tag_error, "no SPP overrun or lost tag");
    chk(dsp_l0id_err == '0 && l1t_sync_errs == 0 && daq_sync_errs == 0, "events stay in step");
    $display("mechanisms: l1a=%0d rej=%0d spp_trunc=%0d timeout_trunc=%0d l1t_gt=%0d daq_gt=%0d",
             n_l1a, n_rej, n_spp_trunc, n_tmo_trunc, n_l1t_gt, n_daq_gt);
    $display("  z=%0d normal_after_z=%0d data_trunc=%0d throttle_cycles=%0d l1t_stall=%0d daq_stall=%0d",
             n_z, n_nz_after_z, n_dt, n_thr_cycles, n_l1t_stall, n_daq_stall);
    $display("  pcn_err=%0d daq_e=%0d resync=%0d l1_reset=%0d l0_reset=%0d link_reset=%0d ready_drop=%0d zs=%0d",
             n_pcn_err, n_daq_e, n_r, n_l1reset, n_l0reset, n_link_reset, n_ready_drop, n_daq_zs);
    $display("  forced_empty=%0d", n_forced);
    $display("  events: L0 %0d, L1T %0d, DAQ %0d", n_ev, l1t_rx, daq_rx);
    chk(n_l1a > 0, "mechanism: L1 accept");
    chk(n_rej > 0, "mechanism: L1 reject");
    chk(n_spp_trunc > 0, "mechanism: SPP cluster limit");
    chk(n_tmo_trunc > 0, "mechanism: SPP time-out");
    chk(n_forced > 0, "mechanism: SPP overload, events sent empty");
    chk(n_l1t_gt > 0, "mechanism: L1T global truncation");
    chk(n_daq_gt > 0, "mechanism: DAQ global truncation");
    chk(n_z > 0 && n_nz_after_z > 0, "mechanism: Z mode switch");
    chk(n_dt > 0, "mechanism: DAQ data cut to the output FIFO");
    chk(n_thr_cycles > 0, "mechanism: throttle");
    chk(n_l1t_stall > 0 && n_daq_stall > 0, "mechanism: S-LINK LFF# stall");
    chk(n_pcn_err > 0 && n_daq_e > 0, "mechanism: PCN synchronisation error");
    chk(n_r >= 2, "mechanism: resync flag after reset");
    chk(n_l1reset > 0 && n_l0reset > 0, "mechanism: reset broadcasts");
    chk(n_link_reset > 0 && n_ready_drop > 0, "mechanism: link re-initialisation");
    chk(n_daq_zs > 0, "mechanism: zero suppression");
    chk(l1t_rx == n_ev && daq_rx == acc_ev.size(), "every event delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
