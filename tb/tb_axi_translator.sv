// tb_axi_translator: self-checking test of the colour-bit-removing translator.
//
// Drives random AXI requests and responses through the translator at its
// default size (8 MB window, colour bits 12 and 13) and checks that
//  - AWADDR and ARADDR come out as (offset within 4 KB page) plus
//    (page number divided by 4) times 4 KB, computed here with arithmetic
//    rather than bit slicing, with nothing above the 2 MB scratchpad;
//  - the worked example 0xA002_3456 -> 0x00_8456 holds;
//  - pages of any one colour map one-to-one onto the whole scratchpad;
//  - every other request and response field passes through unchanged and
//    in the same cycle (no added latency).
module tb_axi_translator;
  import spm_axi_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  axi_req_t  s_req, m_req;
  axi_resp_t s_resp, m_resp;
  int        checks = 0, failures = 0;

  always #5 clk = ~clk;

  axi_translator dut (
    .clk_i (clk), .rst_ni (rst_n),
    .s_req_i (s_req), .s_resp_o (s_resp),
    .m_req_o (m_req), .m_resp_i (m_resp)
  );

  function automatic addr_t ref_xlate(addr_t a);
    longint unsigned off, page;
    off  = longint'(a) % 4096;
    page = (longint'(a) % (64'd1 << 23)) / 4096;
    return addr_t'((page / 4) * 4096 + off);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen [int];

  initial begin
    s_req  = '0;
    m_resp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // worked example
    s_req.aw.addr = 40'h00_A002_3456;
    s_req.ar.addr = 40'h00_A002_3456;
    #1;
    check(m_req.aw.addr == 40'h00_0000_8456, $sformatf("example AW -> %h", m_req.aw.addr));
    check(m_req.ar.addr == 40'h00_0000_8456, $sformatf("example AR -> %h", m_req.ar.addr));

    // random traffic
    for (int i = 0; i < 2000; i++) begin
      axi_req_t  rq;
      axi_resp_t rs;
      rq = axi_req_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
            $urandom, $urandom});
      rs = axi_resp_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      // keep bursts inside one 4 KB page (an AXI4 rule the block relies on)
      rq.aw.burst = BURST_INCR; rq.aw.size = 3'd4; rq.aw.len = 8'd0;
      rq.ar.burst = BURST_WRAP; rq.ar.size = 3'd4; rq.ar.len = 8'd3;
      rq.aw.addr[3:0] = '0; rq.ar.addr[3:0] = '0;
      @(negedge clk);
      s_req  = rq;
      m_resp = rs;
      #1;
      check(m_req.aw.addr == ref_xlate(rq.aw.addr),
            $sformatf("AW %h -> %h, expected %h", rq.aw.addr, m_req.aw.addr, ref_xlate(rq.aw.addr)));
      check(m_req.ar.addr == ref_xlate(rq.ar.addr),
            $sformatf("AR %h -> %h, expected %h", rq.ar.addr, m_req.ar.addr, ref_xlate(rq.ar.addr)));
      begin
        axi_req_t e;
        e = rq;
        e.aw.addr = m_req.aw.addr;
        e.ar.addr = m_req.ar.addr;
        check(m_req == e, "request fields other than the address pass through");
      end
      check(s_resp == rs, "response passes through unchanged");
    end

    // one colour covers the whole 2 MB scratchpad, without aliasing
    for (int c = 0; c < 4; c++) begin
      int distinct;
      bit in_spm;
      seen.delete();
      distinct = 0;
      in_spm   = 1'b1;
      for (int p = 0; p < 512; p++) begin
        addr_t a;
        a = HPM0_SPM0_BASE + addr_t'((p * 4 + c) * 4096);
        s_req.ar.addr = a;
        #1;
        if (m_req.ar.addr >= addr_t'(2 * 1024 * 1024)) in_spm = 1'b0;
        if (!seen.exists(int'(m_req.ar.addr[20:12]))) distinct++;
        seen[int'(m_req.ar.addr[20:12])] = 1'b1;
      end
      check(distinct == 512 && in_spm,
            $sformatf("colour %0d reaches %0d distinct pages of 512", c, distinct));
    end

    s_req = '0;
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
