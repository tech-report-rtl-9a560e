// axi_smc: AXI4 interconnect (crossbar) between PS master ports and the
// scratchpad paths.
//
// N_S slave ports (from masters) are connected to N_M master ports (towards
// translators or controllers). Output port m owns the byte window
// [BASE[m], BASE[m] + SIZE[m]); an address that hits no window goes to an
// internal error slave that answers DECERR.
//
// How it works: writes and reads are switched independently. For each
// direction, every output port is a lock that an input takes for one whole
// transaction. When an input presents AWVALID (ARVALID) and is not already in
// a transaction of that direction, and the output its address decodes to is
// free, the output is granted to it; if several inputs want the same free
// output, a round-robin pointer per output picks one. From the next cycle the
// address beat, the W beats and the B response (or the R beats) flow
// combinationally between the two ports. The lock is released by the B
// handshake (or the RLAST handshake). Traffic to different outputs therefore
// never waits for each other: a core and the DMA reaching the two ports of
// one scratchpad do not interfere here.
//
// Interface: s_req_i/s_resp_o[N_S] and m_req_o/m_resp_i[N_M], AXI4 structs
// from spm_axi_pkg.
//
// Timing: one cycle from AWVALID/ARVALID to the address appearing on the
// output; no added latency afterwards. Each input has at most one write and
// one read transaction in flight.
//
// The original design names these interconnects (stock "SmartConnect"
// blocks) and shows which ports they join; the lock-per-transaction
// switching, the round-robin choice and the error slave are this design's
// choices. The defaults describe interconnect 0 of the subsystem: the
// dedicated core port and the DMA port in, the translator of scratchpad 0,
// the DMA-side controller of scratchpad 0 and the link to interconnect 3 out.
//
// Lint notes: rst_ni is the asynchronous reset of every register and also
// appears in the assertions' disable condition, which a linter reports as a
// signal used both synchronously and asynchronously; no logic samples it.
// The round-robin loop index is an int of which only the low bits matter.
module axi_smc
  import spm_axi_pkg::*;
#(
  parameter int unsigned N_S = 2,
  parameter int unsigned N_M = 3,
  parameter addr_t [N_M-1:0] BASE = {40'h00_8020_0000, LPD_SPM0_BASE, HPM0_SPM0_BASE},
  parameter addr_t [N_M-1:0] SIZE = {40'h00_0010_0000, 40'h00_0020_0000, 40'h00_0080_0000}
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axi_req_t  s_req_i  [N_S],
  output axi_resp_t s_resp_o [N_S],
  output axi_req_t  m_req_o  [N_M],
  input  axi_resp_t m_resp_i [N_M]
);

  localparam int unsigned NO  = N_M + 1;          // outputs incl. error slave
  localparam int unsigned SIW = (N_S > 1) ? $clog2(N_S) : 1;
  localparam int unsigned MIW = $clog2(NO);
  typedef logic [SIW-1:0] sidx_t;
  typedef logic [MIW-1:0] midx_t;

  axi_req_t  oreq  [NO];
  axi_resp_t oresp [NO];

  for (genvar m = 0; m < N_M; m++) begin : g_out
    assign m_req_o[m] = oreq[m];
    assign oresp[m]   = m_resp_i[m];
  end

  axi_err_slv u_err (
    .clk_i,
    .rst_ni,
    .s_req_i  (oreq[N_M]),
    .s_resp_o (oresp[N_M])
  );

  function automatic midx_t decode(addr_t a);
    decode = midx_t'(N_M);
    for (int m = N_M - 1; m >= 0; m--)
      if (a >= BASE[m] && a < BASE[m] + SIZE[m]) decode = midx_t'(m);
  endfunction

  // --------------------------------------------------------------- state
  // per output, write and read locks
  logic [NO-1:0]  wbusy_q, wadone_q, wwdone_q;
  logic [NO-1:0]  rbusy_q, radone_q;
  sidx_t          wsrc_q [NO];
  sidx_t          rsrc_q [NO];
  sidx_t          wrr_q  [NO];
  sidx_t          rrr_q  [NO];
  // per input
  logic [N_S-1:0] sw_act_q, sr_act_q;

  // --------------------------------------------------------------- arbitration
  logic [NO-1:0] wgnt, rgnt;
  sidx_t         wgnt_src [NO];
  sidx_t         rgnt_src [NO];

  always_comb begin
    for (int m = 0; m < NO; m++) begin
      wgnt[m]     = 1'b0;
      rgnt[m]     = 1'b0;
      wgnt_src[m] = '0;
      rgnt_src[m] = '0;
      for (int k = 0; k < N_S; k++) begin
        int s;
        s = (int'(wrr_q[m]) + k) % N_S;
        if (!wbusy_q[m] && !wgnt[m] && !sw_act_q[s] && s_req_i[s].aw_valid &&
            decode(s_req_i[s].aw.addr) == midx_t'(m)) begin
          wgnt[m]     = 1'b1;
          wgnt_src[m] = sidx_t'(s);
        end
        s = (int'(rrr_q[m]) + k) % N_S;
        if (!rbusy_q[m] && !rgnt[m] && !sr_act_q[s] && s_req_i[s].ar_valid &&
            decode(s_req_i[s].ar.addr) == midx_t'(m)) begin
          rgnt[m]     = 1'b1;
          rgnt_src[m] = sidx_t'(s);
        end
      end
    end
  end

  // --------------------------------------------------------------- switching
  always_comb begin
    for (int s = 0; s < N_S; s++) s_resp_o[s] = '0;
    for (int m = 0; m < NO; m++) begin
      oreq[m] = '0;
      // write direction
      oreq[m].aw = s_req_i[wsrc_q[m]].aw;
      oreq[m].w  = s_req_i[wsrc_q[m]].w;
      if (wbusy_q[m]) begin
        oreq[m].aw_valid = !wadone_q[m] && s_req_i[wsrc_q[m]].aw_valid;
        oreq[m].w_valid  = !wwdone_q[m] && s_req_i[wsrc_q[m]].w_valid;
        oreq[m].b_ready  = s_req_i[wsrc_q[m]].b_ready;
        s_resp_o[wsrc_q[m]].aw_ready = !wadone_q[m] && oresp[m].aw_ready;
        s_resp_o[wsrc_q[m]].w_ready  = !wwdone_q[m] && oresp[m].w_ready;
        s_resp_o[wsrc_q[m]].b        = oresp[m].b;
        s_resp_o[wsrc_q[m]].b_valid  = oresp[m].b_valid;
      end
      // read direction
      oreq[m].ar = s_req_i[rsrc_q[m]].ar;
      if (rbusy_q[m]) begin
        oreq[m].ar_valid = !radone_q[m] && s_req_i[rsrc_q[m]].ar_valid;
        oreq[m].r_ready  = s_req_i[rsrc_q[m]].r_ready;
        s_resp_o[rsrc_q[m]].ar_ready = !radone_q[m] && oresp[m].ar_ready;
        s_resp_o[rsrc_q[m]].r        = oresp[m].r;
        s_resp_o[rsrc_q[m]].r_valid  = oresp[m].r_valid;
      end
    end
  end

  // --------------------------------------------------------------- locks
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wbusy_q  <= '0;
      wadone_q <= '0;
      wwdone_q <= '0;
      rbusy_q  <= '0;
      radone_q <= '0;
      sw_act_q <= '0;
      sr_act_q <= '0;
      for (int m = 0; m < NO; m++) begin
        wsrc_q[m] <= '0;
        rsrc_q[m] <= '0;
        wrr_q[m]  <= '0;
        rrr_q[m]  <= '0;
      end
    end else begin
      for (int m = 0; m < NO; m++) begin
        // write lock
        if (wgnt[m]) begin
          wbusy_q[m]            <= 1'b1;
          wadone_q[m]           <= 1'b0;
          wwdone_q[m]           <= 1'b0;
          wsrc_q[m]             <= wgnt_src[m];
          wrr_q[m]              <= sidx_t'((int'(wgnt_src[m]) + 1) % N_S);
          sw_act_q[wgnt_src[m]] <= 1'b1;
        end else if (wbusy_q[m]) begin
          if (oreq[m].aw_valid && oresp[m].aw_ready) wadone_q[m] <= 1'b1;
          if (oreq[m].w_valid && oresp[m].w_ready && oreq[m].w.last) wwdone_q[m] <= 1'b1;
          if (oresp[m].b_valid && oreq[m].b_ready) begin
            wbusy_q[m]          <= 1'b0;
            sw_act_q[wsrc_q[m]] <= 1'b0;
          end
        end
        // read lock
        if (rgnt[m]) begin
          rbusy_q[m]            <= 1'b1;
          radone_q[m]           <= 1'b0;
          rsrc_q[m]             <= rgnt_src[m];
          rrr_q[m]              <= sidx_t'((int'(rgnt_src[m]) + 1) % N_S);
          sr_act_q[rgnt_src[m]] <= 1'b1;
        end else if (rbusy_q[m]) begin
          if (oreq[m].ar_valid && oresp[m].ar_ready) radone_q[m] <= 1'b1;
          if (oresp[m].r_valid && oreq[m].r_ready && oresp[m].r.last) begin
            rbusy_q[m]          <= 1'b0;
            sr_act_q[rsrc_q[m]] <= 1'b0;
          end
        end
      end
    end
  end

  // An input is locked to at most one output per direction.
  for (genvar s = 0; s < N_S; s++) begin : g_chk
    a_aw_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
      s_req_i[s].aw_valid && !s_resp_o[s].aw_ready |=> s_req_i[s].aw_valid)
      else $error("master %0d dropped AWVALID before AWREADY", s);
    a_ar_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
      s_req_i[s].ar_valid && !s_resp_o[s].ar_ready |=> s_req_i[s].ar_valid)
      else $error("master %0d dropped ARVALID before ARREADY", s);
  end

endmodule
