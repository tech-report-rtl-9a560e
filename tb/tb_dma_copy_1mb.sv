// tb_dma_copy_1mb: a 1 MB DMA load into the 2 MB scratchpad, at full size.
//
// The DMA port (LPD) writes one whole partition of SPM 0 (the upper 1 MB)
// in 16-beat bursts, 4096 of them, while the core on HPM0 keeps executing
// from the lower partition through its coloured window (colour 2). Checked:
//  - every core read during the copy returns the right data and takes the
//    same number of cycles as the same read with the DMA idle (the two
//    ports of the scratchpad keep core and DMA apart);
//  - the copy streams one beat per cycle inside a burst: the whole 1 MB
//    takes no more than 20 cycles per 16-beat burst;
//  - after the copy, the core reads 512 random bursts of the new partition
//    through a different colour window (colour 3), and the DMA unloads the
//    first 64 KB; both match the pattern written.
// Word contents are a fixed function of the scratchpad byte offset, computed
// here independently of the design. The cycle count of the copy is printed,
// so that it can be turned into a transfer time for a chosen clock.
module tb_dma_copy_1mb;
  import spm_axi_pkg::*;

  localparam longint PART    = 1024 * 1024;       // one half of the 2 MB scratchpad
  localparam longint LPD0    = 64'h8000_0000;     // SPM 0, DMA side
  localparam int     BURSTS  = int'(PART / 256);  // 16 beats of 16 bytes each

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  axi_req_t  hpm0_req, hpm1_req, lpd_req;
  axi_resp_t hpm0_resp, hpm1_resp, lpd_resp;
  int        checks = 0, failures = 0;
  longint    cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  axi_master_bfm u_hpm0 (.clk_i (clk), .req_o (hpm0_req), .resp_i (hpm0_resp));
  axi_master_bfm u_lpd  (.clk_i (clk), .req_o (lpd_req),  .resp_i (lpd_resp));
  assign hpm1_req = '0;

  spm_pl_top dut (
    .clk_i (clk), .rst_ni (rst_n),
    .hpm0_req_i (hpm0_req), .hpm0_resp_o (hpm0_resp),
    .hpm1_req_i (hpm1_req), .hpm1_resp_o (hpm1_resp),
    .lpd_req_i  (lpd_req),  .lpd_resp_o  (lpd_resp)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // contents of the 16-byte word at scratchpad offset o
  function automatic data_t pat(longint o);
    logic [31:0] w;
    w = 32'(o >> 4);
    return {w ^ 32'h5a5a_0f0f, ~w, w * 32'h9e37_79b9, w + 32'h1234_5678};
  endfunction

  // core window address of scratchpad offset o for colour c
  function automatic addr_t core_addr(longint o, int c);
    return addr_t'(HPM0_SPM0_BASE) + addr_t'(((o >> 12) * 4 + c) * 4096 + (o % 4096));
  endfunction

  task automatic dma_store(longint o);
    data_t d[];
    strb_t s[];
    logic [1:0] br;
    id_t bid;
    d = new[16];
    s = new[16];
    for (int i = 0; i < 16; i++) begin d[i] = pat(o + 16 * i); s[i] = '1; end
    u_lpd.write(6'h01, addr_t'(LPD0 + o), 15, 4, BURST_INCR, d, s, br, bid);
    check(br == RESP_OKAY, "DMA write OKAY");
  endtask

  task automatic dma_fetch(longint o);
    data_t d[];
    logic [1:0] rr;
    logic lok;
    id_t rid;
    u_lpd.read(6'h02, addr_t'(LPD0 + o), 15, 4, BURST_INCR, d, rr, lok, rid);
    check(rr == RESP_OKAY && lok, "DMA read OKAY with RLAST");
    for (int i = 0; i < 16; i++)
      check(d[i] == pat(o + 16 * i), $sformatf("DMA unload offset %h", o + 16 * i));
  endtask

  // one 16-beat core read; returns its duration in cycles
  task automatic core_fetch(longint o, int c, output longint dur);
    data_t d[];
    logic [1:0] rr;
    logic lok;
    id_t rid;
    longint t0;
    t0 = cyc;
    u_hpm0.read(6'h10, core_addr(o, c), 15, 4, BURST_INCR, d, rr, lok, rid);
    dur = cyc - t0;
    check(rr == RESP_OKAY && lok, "core read OKAY with RLAST");
    for (int i = 0; i < 16; i++)
      check(d[i] == pat(o + 16 * i), $sformatf("core read offset %h colour %0d", o + 16 * i, c));
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_alone, t_copy, dur, worst;
    int     core_reads;
    bit     copying;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // the running task: 64 KB at the start of the lower partition
    for (longint o = 0; o < 65536; o += 256) dma_store(o);
    core_fetch(0, 2, t_alone);

    // the 1 MB load into the upper partition, with the core running
    worst = 0;
    core_reads = 0;
    copying = 1'b1;
    t_copy = cyc;
    fork
      begin
        for (int b = 0; b < BURSTS; b++) dma_store(PART + longint'(b) * 256);
        t_copy = cyc - t_copy;
        copying = 1'b0;
      end
      while (copying) begin
        core_fetch(longint'($urandom % 256) * 256, 2, dur);
        if (dur > worst) worst = dur;
        core_reads++;
      end
    join
    $display("1 MB DMA load: %0d cycles (%0d bursts); %0d core reads meanwhile, %0d cycles each at worst, %0d alone",
             t_copy, BURSTS, core_reads, worst, t_alone);
    check(core_reads > 100, "the core kept executing during the copy");
    check(worst == t_alone, $sformatf("core read %0d cycles during the copy, %0d alone", worst, t_alone));
    check(t_copy >= longint'(BURSTS) * 16, "copy cannot beat one beat per cycle");
    check(t_copy <= longint'(BURSTS) * 20, $sformatf("copy took %0d cycles, above 20 per burst", t_copy));

    // the new partition, seen by the core through another colour, and unloaded
    for (int n = 0; n < 512; n++) core_fetch(PART + longint'($urandom % 4096) * 256, 3, dur);
    for (longint o = PART; o < PART + 65536; o += 256) dma_fetch(o);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
