// tb_spm_pl_top: end-to-end test of the scratchpad subsystem at full size.
//
// Three AXI master models stand for the PS ports: HPM0 (the core with the
// 2 MB scratchpad), HPM1 (shared by the two cores with 512 KB scratchpads)
// and LPD (the DMA engine). The test runs the anomaly-detection task set of
// the case study under the load / execute / unload model with two
// partitions per scratchpad:
//   core 0 (SPM 0, colour 2): NFER, two jobs
//   core 1 (SPM 1, colour 1): Spike, Spectrum
//   core 2 (SPM 2, colour 0): Level, Clipping, Voter
// Each task's image (code + data bytes of the case study) is loaded by the
// DMA into one partition, the core reads it all back through its coloured
// window (execution) and writes a 256-byte result record, and the DMA reads
// the record back (unload). In every round the cores execute from one
// partition while the DMA unloads and loads the other, as in the two-
// partition pipeline. Data patterns are computed from (core, task, offset),
// independently of the design.
//
// Mechanisms counted at the ports, each must occur: data beats of a core and
// of the DMA on the same scratchpad in the same cycle; core accesses translated from each of the three coloured
// windows; DMA accesses to each scratchpad; core and DMA traffic in flight
// through interconnect 0 in the same cycle; colour aliasing (two colours, same word);
// DECERR on each of the three ports. Also checked: a core burst never takes
// longer while the DMA works on the same scratchpad than it does alone.
module tb_spm_pl_top;
  import spm_axi_pkg::*;

  localparam int SPM0 = 2 * 1024 * 1024;
  localparam int SPM12 = 512 * 1024;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  axi_req_t  hpm0_req, hpm1_req, lpd_req;
  axi_resp_t hpm0_resp, hpm1_resp, lpd_resp;
  int        checks = 0, failures = 0;
  longint    cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  axi_master_bfm u_hpm0 (.clk_i (clk), .req_o (hpm0_req), .resp_i (hpm0_resp));
  axi_master_bfm u_hpm1 (.clk_i (clk), .req_o (hpm1_req), .resp_i (hpm1_resp));
  axi_master_bfm u_lpd  (.clk_i (clk), .req_o (lpd_req),  .resp_i (lpd_resp));

  spm_pl_top dut (
    .clk_i (clk), .rst_ni (rst_n),
    .hpm0_req_i (hpm0_req), .hpm0_resp_o (hpm0_resp),
    .hpm1_req_i (hpm1_req), .hpm1_resp_o (hpm1_resp),
    .lpd_req_i  (lpd_req),  .lpd_resp_o  (lpd_resp)
  );

  // ------------------------------------------------------------ mechanism counters
  int n_dual [3];
  int n_xlate [3];
  int n_dma [3];
  int n_smc0_both;
  int n_alias;
  int n_decerr [3];

  // which scratchpad the HPM1 and LPD masters are currently working on
  int hpm1_tgt = 1;
  int lpd_tgt  = 0;

  function automatic bit beat(axi_req_t rq, axi_resp_t rs);
    return (rq.w_valid && rs.w_ready) || (rs.r_valid && rq.r_ready);
  endfunction

  function automatic bit addr_hs(axi_req_t rq, axi_resp_t rs);
    return (rq.aw_valid && rs.aw_ready) || (rq.ar_valid && rs.ar_ready);
  endfunction

  always @(posedge clk) begin
    // data beats on the core port and the DMA port of one scratchpad together
    if (beat(hpm0_req, hpm0_resp) && beat(lpd_req, lpd_resp) && lpd_tgt == 0) n_dual[0]++;
    if (beat(hpm1_req, hpm1_resp) && beat(lpd_req, lpd_resp) && lpd_tgt == hpm1_tgt) n_dual[hpm1_tgt]++;
    if (addr_hs(hpm0_req, hpm0_resp)) n_xlate[0]++;
    if (addr_hs(hpm1_req, hpm1_resp)) n_xlate[hpm1_tgt]++;
    if (addr_hs(lpd_req, lpd_resp)) n_dma[lpd_tgt]++;
    if (beat(hpm0_req, hpm0_resp) && beat(lpd_req, lpd_resp)) n_smc0_both++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ address helpers
  function automatic int spm_bytes(int k);
    return (k == 0) ? SPM0 : SPM12;
  endfunction

  function automatic int colour(int k);
    return 2 - k;
  endfunction

  function automatic addr_t lpd_addr(int k, int off);
    longint base;
    base = 64'h8000_0000 + ((k >= 1) ? SPM0 : 0) + ((k == 2) ? SPM12 : 0);
    return addr_t'(base + off);
  endfunction

  // a core address: scratchpad page p sits at window page 4 p + colour
  function automatic addr_t core_addr(int k, int off, int c);
    longint base;
    base = (k == 0) ? 64'hA000_0000 : (k == 1) ? 64'hB000_0000 : 64'hB020_0000;
    return addr_t'(base + longint'(off / 4096) * 16384 + c * 4096 + off % 4096);
  endfunction

  function automatic data_t pattern(int k, int t, int off, int kind);
    return {32'(k * 16 + t), 32'(off), 32'(off) ^ 32'hA5C3_5A3C, 32'(kind * 7 + 1)};
  endfunction

  // ------------------------------------------------------------ burst movers
  // Moves nbytes (multiple of 16) at scratchpad offset off in bursts of up
  // to 16 beats that never cross a 4 KB page.
  longint core_solo_max = 0;   // longest 16-beat core read, DMA idle
  longint core_busy_max = 0;   // longest 16-beat core read, DMA busy
  bit     dma_busy = 0;

  task automatic xfer(int k, int t, int off, int nbytes, bit by_core, bit is_write, int kind);
    int o;
    o = off;
    while (o < off + nbytes) begin
      int beats;
      data_t d[];
      strb_t s[];
      logic [1:0] r;
      logic lok;
      id_t id;
      addr_t a;
      longint t0;
      beats = (4096 - (o % 4096)) / 16;
      if (beats > 16) beats = 16;
      if (beats > (off + nbytes - o) / 16) beats = (off + nbytes - o) / 16;
      a = by_core ? core_addr(k, o, colour(k)) : lpd_addr(k, o);
      if (by_core && k != 0) hpm1_tgt = k;
      if (!by_core) lpd_tgt = k;
      if (is_write) begin
        d = new[beats];
        s = new[beats];
        for (int i = 0; i < beats; i++) begin
          d[i] = pattern(k, t, o + 16 * i, kind);
          s[i] = '1;
        end
        if (!by_core)    u_lpd.write(id_t'(k), a, beats - 1, 4, BURST_INCR, d, s, r, id);
        else if (k == 0) u_hpm0.write(id_t'(k), a, beats - 1, 4, BURST_INCR, d, s, r, id);
        else             u_hpm1.write(id_t'(k), a, beats - 1, 4, BURST_INCR, d, s, r, id);
        check(r == RESP_OKAY, "write OKAY");
      end else begin
        t0 = cyc;
        if (!by_core)    u_lpd.read(id_t'(k), a, beats - 1, 4, BURST_INCR, d, r, lok, id);
        else if (k == 0) u_hpm0.read(id_t'(k), a, beats - 1, 4, BURST_INCR, d, r, lok, id);
        else             u_hpm1.read(id_t'(k), a, beats - 1, 4, BURST_INCR, d, r, lok, id);
        if (by_core && beats == 16) begin
          if (dma_busy) begin if (cyc - t0 > core_busy_max) core_busy_max = cyc - t0; end
          else if (cyc - t0 > core_solo_max) core_solo_max = cyc - t0;
        end
        check(r == RESP_OKAY && lok, "read OKAY with RLAST");
        for (int i = 0; i < beats; i++)
          check(d[i] == pattern(k, t, o + 16 * i, kind),
                $sformatf("%s read SPM %0d offset %h", by_core ? "core" : "DMA", k, o + 16 * i));
      end
      o += 16 * beats;
    end
  endtask

  // ------------------------------------------------------------ task set
  // image bytes = code + data of the case-study detectors, rounded up to 16
  int n_tasks [3] = '{2, 2, 3};
  int img [3][3] = '{'{15400 + 309664, 15400 + 309664, 0}, // NFER, two jobs
                     '{696 + 6400, 2520 + 1912, 0},   // Spike, Spectrum
                     '{796 + 7680, 336 + 12800, 8223 + 1280}}; // Level, Clip/Loss, Voter

  function automatic int round16(int n);
    return (n + 15) / 16 * 16;
  endfunction

  function automatic int part(int k, int t);
    return (t % 2) * (spm_bytes(k) / 2);
  endfunction

  function automatic int out_off(int k, int t);
    return part(k, t) + round16(img[k][t]);
  endfunction

  task automatic dma_load(int k, int t);
    if (t >= 0 && t < n_tasks[k]) xfer(k, t, part(k, t), round16(img[k][t]), 1'b0, 1'b1, 0);
  endtask

  task automatic dma_unload(int k, int t);
    if (t >= 0 && t < n_tasks[k]) xfer(k, t, out_off(k, t), 256, 1'b0, 1'b0, 1);
  endtask

  task automatic core_exec(int k, int t);
    if (t >= 0 && t < n_tasks[k]) begin
      xfer(k, t, part(k, t), round16(img[k][t]), 1'b1, 1'b0, 0);   // run: read the image
      xfer(k, t, out_off(k, t), 256, 1'b1, 1'b1, 1);              // write the result record
    end
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // round -1: load the first task of every core
    dma_busy = 1;
    for (int k = 0; k < 3; k++) dma_load(k, 0);
    dma_busy = 0;

    // rounds: cores execute task r while the DMA unloads r-1 and loads r+1
    for (int r = 0; r <= 3; r++) begin
      fork
        begin
          dma_busy = 1;
          for (int k = 0; k < 3; k++) begin
            dma_unload(k, r - 1);
            dma_load(k, r + 1);
          end
          dma_busy = 0;
        end
        core_exec(0, r);
        begin
          core_exec(1, r);
          core_exec(2, r);
        end
      join
    end

    // a core burst alone, for the contention comparison
    dma_busy = 0;
    xfer(0, 0, part(0, 0), 256, 1'b1, 1'b0, 0);

    // colour aliasing: the same word seen through another colour
    begin
      data_t d[];
      strb_t s[];
      logic [1:0] r;
      logic lok;
      id_t id;
      d = new[1];
      s = new[1];
      d[0] = 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210;
      s[0] = '1;
      hpm1_tgt = 1;
      lpd_tgt  = 1;
      u_hpm1.write(id_t'(1), core_addr(1, 8192, 1), 0, 4, BURST_INCR, d, s, r, id);
      u_hpm1.read(id_t'(1), core_addr(1, 8192, 3), 0, 4, BURST_INCR, d, r, lok, id);
      check(d[0] == 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210, "colour 3 aliases colour 1");
      if (d[0] == 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210) n_alias++;
      // and the DMA sees it at the untranslated offset
      u_lpd.read(id_t'(0), lpd_addr(1, 8192), 0, 4, BURST_INCR, d, r, lok, id);
      check(d[0] == 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210, "DMA sees the core's word");
    end

    // decode errors on each port
    begin
      data_t d[];
      logic [1:0] r;
      logic lok;
      id_t id;
      u_hpm0.read(id_t'(0), 40'h00_A080_0000, 1, 4, BURST_INCR, d, r, lok, id);
      if (r == RESP_DECERR && lok) n_decerr[0]++;
      u_hpm1.read(id_t'(0), 40'h00_B040_0000, 1, 4, BURST_INCR, d, r, lok, id);
      if (r == RESP_DECERR && lok) n_decerr[1]++;
      u_lpd.read(id_t'(0), 40'h00_8030_0000, 1, 4, BURST_INCR, d, r, lok, id);
      if (r == RESP_DECERR && lok) n_decerr[2]++;
    end

    // every mechanism happened
    for (int k = 0; k < 3; k++) begin
      check(n_dual[k] > 0, $sformatf("SPM %0d: core and DMA ports active together (%0d cycles)", k, n_dual[k]));
      check(n_xlate[k] > 0, $sformatf("translator %0d used (%0d bursts)", k, n_xlate[k]));
      check(n_dma[k] > 0, $sformatf("DMA reached SPM %0d (%0d bursts)", k, n_dma[k]));
      check(n_decerr[k] > 0, $sformatf("DECERR on port %0d", k));
    end
    check(n_smc0_both > 0, "core and DMA data moving through interconnect 0 together");
    check(n_alias > 0, "colour aliasing");
    check(core_solo_max > 0 && core_busy_max > 0 && core_busy_max <= core_solo_max,
          $sformatf("core 16-beat read: %0d cycles with DMA busy, %0d alone", core_busy_max, core_solo_max));
    $display("mechanisms: dual-port cycles %0d/%0d/%0d, translated bursts %0d/%0d/%0d, DMA bursts %0d/%0d/%0d, smc0 overlap %0d, core burst %0d cycles",
             n_dual[0], n_dual[1], n_dual[2], n_xlate[0], n_xlate[1], n_xlate[2],
             n_dma[0], n_dma[1], n_dma[2], n_smc0_both, core_busy_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
