// tb_axi_smc: self-checking test of the AXI4 interconnect.
//
// Two master models drive a 2x2 instance of the interconnect; each output
// port leads to a scratchpad controller with a 64 KB RAM, at 0x1000_0000 and
// 0x2000_0000. Checked:
//  - traffic from the two masters to different outputs runs in parallel:
//    two simultaneous 16-beat writes finish as fast as one alone;
//  - two masters aiming at the same output are both served, one after the
//    other, with correct data;
//  - an address outside both windows answers DECERR on B and on every R
//    beat, with RLAST on the last of LEN+1 beats;
//  - 300 random bursts per master, issued concurrently with back-pressure,
//    to both outputs, read back against a byte-level reference model.
module tb_axi_smc;
  import spm_axi_pkg::*;

  localparam int unsigned MEM_BYTES = 64 * 1024;
  localparam int unsigned MAW = $clog2(MEM_BYTES / AXI_SW);
  localparam addr_t B0 = 40'h00_1000_0000;
  localparam addr_t B1 = 40'h00_2000_0000;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  axi_req_t  s_req  [2];
  axi_resp_t s_resp [2];
  axi_req_t  m_req  [2];
  axi_resp_t m_resp [2];
  int        checks = 0, failures = 0;
  longint    cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  axi_master_bfm u_m0 (.clk_i (clk), .req_o (s_req[0]), .resp_i (s_resp[0]));
  axi_master_bfm u_m1 (.clk_i (clk), .req_o (s_req[1]), .resp_i (s_resp[1]));

  axi_smc #(
    .N_S  (2),
    .N_M  (2),
    .BASE ({B1, B0}),
    .SIZE ({addr_t'(MEM_BYTES), addr_t'(MEM_BYTES)})
  ) dut (
    .clk_i (clk), .rst_ni (rst_n),
    .s_req_i (s_req), .s_resp_o (s_resp),
    .m_req_o (m_req), .m_resp_i (m_resp)
  );

  for (genvar k = 0; k < 2; k++) begin : g_slv
    logic           en;
    strb_t          we;
    logic [MAW-1:0] addr;
    data_t          wd, rd;
    axi_bram_ctrl #(.MEM_BYTES(MEM_BYTES)) u_ctrl (
      .clk_i (clk), .rst_ni (rst_n),
      .s_req_i (m_req[k]), .s_resp_o (m_resp[k]),
      .ram_en_o (en), .ram_we_o (we), .ram_addr_o (addr), .ram_wdata_o (wd), .ram_rdata_i (rd)
    );
    spm_dpram #(.BYTES(MEM_BYTES), .DW(AXI_DW)) u_ram (
      .clk_i (clk),
      .a_en_i (en), .a_we_i (we), .a_addr_i (addr), .a_wdata_i (wd), .a_rdata_o (rd),
      .b_en_i (1'b0), .b_we_i ('0), .b_addr_i ('0), .b_wdata_i ('0), .b_rdata_o ()
    );
  end

  logic [7:0] model [longint];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic data_t model_word(longint a);
    data_t w;
    longint base;
    base = (a / AXI_SW) * AXI_SW;
    for (int i = 0; i < AXI_SW; i++)
      w[i*8 +: 8] = model.exists(base + i) ? model[base + i] : 8'h00;
    return w;
  endfunction

  // full-width INCR bursts only: beat i sits at start + 16 i
  task automatic wr(int m, longint a, int len, output logic [1:0] br);
    data_t d[];
    strb_t s[];
    id_t   bid;
    d = new[len + 1];
    s = new[len + 1];
    for (int i = 0; i <= len; i++) begin
      d[i] = {$urandom, $urandom, $urandom, $urandom};
      s[i] = '1;  // full strobes: RAM words never written hold random values
      for (int k = 0; k < AXI_SW; k++) if (s[i][k]) model[a + i * AXI_SW + k] = d[i][k*8 +: 8];
    end
    if (m == 0) u_m0.write(id_t'(m), addr_t'(a), len, 4, BURST_INCR, d, s, br, bid);
    else        u_m1.write(id_t'(m), addr_t'(a), len, 4, BURST_INCR, d, s, br, bid);
    check(bid == id_t'(m), "B carries the master's ID");
  endtask

  task automatic rd_chk(int m, longint a, int len);
    data_t d[];
    logic [1:0] rr;
    logic lok;
    id_t rid;
    if (m == 0) u_m0.read(id_t'(m), addr_t'(a), len, 4, BURST_INCR, d, rr, lok, rid);
    else        u_m1.read(id_t'(m), addr_t'(a), len, 4, BURST_INCR, d, rr, lok, rid);
    check(rr == RESP_OKAY && lok && rid == id_t'(m), "read response, RLAST and ID");
    for (int i = 0; i <= len; i++)
      check(d[i] == model_word(a + i * AXI_SW),
            $sformatf("master %0d read %h beat %0d", m, a, i));
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] br0, br1;
    longint t0, t_solo, t_par, t_end0, t_end1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // one 16-beat write alone
    t0 = cyc;
    wr(0, B0, 15, br0);
    t_solo = cyc - t0;
    check(br0 == RESP_OKAY, "solo write OKAY");

    // two at once to different outputs: parallel
    t0 = cyc;
    fork
      wr(0, B0 + 4096, 15, br0);
      wr(1, B1 + 4096, 15, br1);
    join
    t_par = cyc - t0;
    check(br0 == RESP_OKAY && br1 == RESP_OKAY, "parallel writes OKAY");
    check(t_par == t_solo, $sformatf("different outputs in parallel: %0d cycles, alone %0d", t_par, t_solo));

    // two at once to the same output: served one after the other
    t0 = cyc;
    fork
      begin wr(0, B1 + 8192, 15, br0); t_end0 = cyc; end
      begin wr(1, B1 + 8192 + 256, 15, br1); t_end1 = cyc; end
    join
    check(br0 == RESP_OKAY && br1 == RESP_OKAY, "shared-output writes OKAY");
    check((t_end0 > t_end1 ? t_end0 - t_end1 : t_end1 - t_end0) >= 16,
          "shared output serialises the two bursts");
    rd_chk(0, B1 + 8192, 31);
    rd_chk(1, B0 + 4096, 15);
    rd_chk(0, B1 + 4096, 15);

    // decode error
    begin
      data_t d[];
      strb_t s[];
      logic [1:0] rr;
      logic lok;
      id_t id;
      d = new[4];
      s = new[4];
      foreach (d[i]) begin d[i] = '0; s[i] = '1; end
      u_m1.write(6'h21, 40'h00_3000_0000, 3, 4, BURST_INCR, d, s, br1, id);
      check(br1 == RESP_DECERR && id == 6'h21, "unmapped write answers DECERR");
      u_m0.read(6'h12, 40'h00_0fff_f000, 5, 4, BURST_INCR, d, rr, lok, id);
      check(rr == RESP_DECERR && lok && d.size() == 6 && id == 6'h12,
            "unmapped read answers DECERR, 6 beats, RLAST on the last");
    end

    // concurrent random traffic, each master in its own quarter of each RAM;
    // fill those quarters first so that every word read has a known value
    for (int q = 0; q < 2; q++)
      for (longint o = 0; o < 16384 + 512; o += 256) begin
        logic [1:0] b;
        wr(q, B0 + 16384 * (q + 1) + o, 15, b);
        wr(q, B1 + 16384 * (q + 1) + o, 15, b);
      end
    u_m0.stall_pct = 25;
    u_m1.stall_pct = 25;
    fork
      for (int n = 0; n < 300; n++) begin
        longint a;
        int len;
        logic [1:0] b;
        len = $urandom % 16;
        a = (($urandom % 2) ? B1 : B0) + 16384 + ($urandom % 4) * 4096 + ($urandom % 16) * 16;
        if ($urandom % 2) begin wr(0, a, len, b); check(b == RESP_OKAY, "random write m0"); end
        else rd_chk(0, a, len);
      end
      for (int n = 0; n < 300; n++) begin
        longint a;
        int len;
        logic [1:0] b;
        len = $urandom % 16;
        a = (($urandom % 2) ? B1 : B0) + 32768 + ($urandom % 4) * 4096 + ($urandom % 16) * 16;
        if ($urandom % 2) begin wr(1, a, len, b); check(b == RESP_OKAY, "random write m1"); end
        else rd_chk(1, a, len);
      end
    join

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
