// tb_axi_bram_ctrl: self-checking test of the AXI4 scratchpad controller.
//
// The controller (default 2 MB) drives a scratchpad RAM of the same size; an
// AXI master model issues bursts on its slave port. A byte-level reference
// model, with beat addresses computed here from the AXI4 formulas, predicts
// every read. Checked:
//  - 16-beat INCR write and read-back, with OKAY responses, echoed IDs and
//    RLAST on the last beat only;
//  - timing without back-pressure: a write burst of N beats completes its B
//    handshake N+1 cycles after AW is taken; a read burst delivers its last
//    beat N+1 cycles after AR is taken (one beat per cycle);
//  - 600 random bursts (FIXED, INCR, WRAP; 1 to 16 beats; full and narrow
//    sizes; random strobes) with random W gaps and RREADY back-pressure;
//  - a write and a read issued at the same time both complete correctly.
module tb_axi_bram_ctrl;
  import spm_axi_pkg::*;

  localparam int unsigned MEM_BYTES = 2 * 1024 * 1024;
  localparam int unsigned MAW = $clog2(MEM_BYTES / AXI_SW);

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  axi_req_t  req;
  axi_resp_t resp;
  logic           ram_en;
  strb_t          ram_we;
  logic [MAW-1:0] ram_addr;
  data_t          ram_wdata, ram_rdata;
  int        checks = 0, failures = 0;
  longint    cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  axi_master_bfm u_bfm (.clk_i (clk), .req_o (req), .resp_i (resp));

  axi_bram_ctrl dut (
    .clk_i (clk), .rst_ni (rst_n),
    .s_req_i (req), .s_resp_o (resp),
    .ram_en_o (ram_en), .ram_we_o (ram_we), .ram_addr_o (ram_addr),
    .ram_wdata_o (ram_wdata), .ram_rdata_i (ram_rdata)
  );

  spm_dpram #(.BYTES(MEM_BYTES), .DW(AXI_DW)) u_ram (
    .clk_i (clk),
    .a_en_i (ram_en), .a_we_i (ram_we), .a_addr_i (ram_addr), .a_wdata_i (ram_wdata),
    .a_rdata_o (ram_rdata),
    .b_en_i (1'b0), .b_we_i ('0), .b_addr_i ('0), .b_wdata_i ('0), .b_rdata_o ()
  );

  // handshake time stamps
  longint t_aw, t_b, t_ar, t_rlast;
  always @(posedge clk) begin
    if (req.aw_valid && resp.aw_ready) t_aw <= cyc;
    if (resp.b_valid && req.b_ready) t_b <= cyc;
    if (req.ar_valid && resp.ar_ready) t_ar <= cyc;
    if (resp.r_valid && req.r_ready && resp.r.last) t_rlast <= cyc;
  end

  logic [7:0] mem_model [longint];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // AXI4 beat address, from the specification's formulas
  function automatic longint beat_addr(longint start, int n, int len, int size, logic [1:0] burst);
    longint nb, aligned, total, lower, a;
    nb      = 64'd1 << size;
    aligned = (start / nb) * nb;
    if (burst == BURST_FIXED || n == 0) return start;
    a = aligned + n * nb;
    if (burst == BURST_WRAP) begin
      total = nb * (len + 1);
      lower = (start / total) * total;
      if (a >= lower + total) a = a - total;
    end
    return a;
  endfunction

  function automatic data_t model_word(longint a);
    data_t w;
    longint base;
    base = (a / AXI_SW) * AXI_SW;
    for (int i = 0; i < AXI_SW; i++)
      w[i*8 +: 8] = mem_model.exists(base + i) ? mem_model[base + i] : 8'h00;
    return w;
  endfunction

  task automatic do_write(id_t id, longint a, int len, int size, logic [1:0] burst, bit full_strb);
    data_t d[];
    strb_t s[];
    logic [1:0] br;
    id_t bid;
    d = new[len + 1];
    s = new[len + 1];
    for (int i = 0; i <= len; i++) begin
      longint ba, base;
      d[i] = {$urandom, $urandom, $urandom, $urandom};
      s[i] = full_strb ? '1 : strb_t'($urandom);
      ba   = beat_addr(a, i, len, size, burst);
      base = (ba / AXI_SW) * AXI_SW;
      for (int k = 0; k < AXI_SW; k++) if (s[i][k]) mem_model[base + k] = d[i][k*8 +: 8];
    end
    u_bfm.write(id, addr_t'(a), len, size, burst, d, s, br, bid);
    check(br == RESP_OKAY, "write response OKAY");
    check(bid == id, "write response echoes AWID");
  endtask

  task automatic do_read(id_t id, longint a, int len, int size, logic [1:0] burst);
    data_t d[];
    logic [1:0] rr;
    logic lok;
    id_t rid;
    u_bfm.read(id, addr_t'(a), len, size, burst, d, rr, lok, rid);
    check(rr == RESP_OKAY, "read response OKAY");
    check(lok, "RLAST on the last beat only");
    check(rid == id, "read data echoes ARID");
    for (int i = 0; i <= len; i++)
      check(d[i] == model_word(beat_addr(a, i, len, size, burst)),
            $sformatf("read %h beat %0d burst %0d: got %h expected %h", a, i, burst, d[i],
                      model_word(beat_addr(a, i, len, size, burst))));
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // fill a 16 KB region near the top of the memory with full-width bursts
    for (int p = 0; p < 64; p++) do_write(id_t'(p), MEM_BYTES - 16384 + p * 256, 15, 4, BURST_INCR, 1'b1);

    // timing of a 16-beat write and read without back-pressure
    do_write(6'h15, 32'h100, 15, 4, BURST_INCR, 1'b1);
    #1;  // let the time stamps of the last edge settle
    check(t_b - t_aw == 17, $sformatf("16-beat write: B %0d cycles after AW (expected 17)", t_b - t_aw));
    do_read(6'h2a, 32'h100, 15, 4, BURST_INCR);
    #1;
    check(t_rlast - t_ar == 17, $sformatf("16-beat read: last beat %0d cycles after AR (expected 17)",
                                          t_rlast - t_ar));
    do_read(6'h01, 32'h100, 0, 4, BURST_INCR);
    #1;
    check(t_rlast - t_ar == 2, $sformatf("single read: %0d cycles (expected 2)", t_rlast - t_ar));

    // random bursts with back-pressure
    u_bfm.stall_pct = 30;
    for (int n = 0; n < 600; n++) begin
      int len, size, kind;
      logic [1:0] burst;
      longint a;
      kind = $urandom % 3;
      size = $urandom % 5;                          // 1 .. 16 bytes per beat
      if (kind == 0) begin burst = BURST_FIXED; len = $urandom % 16; end
      else if (kind == 1) begin burst = BURST_INCR; len = $urandom % 16; end
      else begin burst = BURST_WRAP; len = (2 << ($urandom % 4)) - 1; end
      // stay inside one 4 KB page of the filled region
      a = MEM_BYTES - 16384 + ($urandom % 4) * 4096 + ($urandom % 2048);
      a = (a >> size) << size;
      if (burst == BURST_INCR && ((a % 4096) + ((len + 1) << size) > 4096)) a = a - ((len + 1) << size);
      if (($urandom % 2) == 0) do_write(id_t'($urandom), a, len, size, burst, 1'b0);
      else                     do_read(id_t'($urandom), a, len, size, burst);
    end

    // a write and a read presented together
    u_bfm.stall_pct = 0;
    fork
      do_write(6'h3, MEM_BYTES - 16384, 7, 4, BURST_INCR, 1'b1);
      do_read(6'h4, MEM_BYTES - 8192, 7, 4, BURST_INCR);
    join
    do_read(6'h5, MEM_BYTES - 16384, 7, 4, BURST_INCR);

    check(u_bfm.r_stalls > 0, "RREADY back-pressure was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
