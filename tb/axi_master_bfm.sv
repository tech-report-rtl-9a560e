// axi_master_bfm: AXI4 master model for the testbenches.
//
// Testbenches call its tasks hierarchically (u_bfm.write(...), u_bfm.read(...)).
// A write drives AW and the W beats in parallel, then waits for B; a read
// drives AR and collects the R beats. With stall_pct above zero, W beats are
// delayed and RREADY is withheld on random cycles, to exercise back-pressure.
// Signals change on the clock's rising edge (non-blocking) and are sampled
// on it, so a handshake counts in the cycle where both sides are high.
// Counters of beats and handshakes are kept for the testbenches to check.
module axi_master_bfm
  import spm_axi_pkg::*;
(
  input  logic      clk_i,
  output axi_req_t  req_o,
  input  axi_resp_t resp_i
);

  int unsigned stall_pct = 0;   // per-beat chance of a W gap / RREADY low
  int unsigned w_beats   = 0;
  int unsigned r_beats   = 0;
  int unsigned r_stalls  = 0;   // cycles with RVALID high and RREADY low

  initial req_o = '0;

  function automatic ax_t mk_ax(id_t id, addr_t a, int unsigned len, int unsigned size,
                                logic [1:0] burst);
    ax_t ax;
    ax.id    = id;
    ax.addr  = a;
    ax.len   = 8'(len);
    ax.size  = 3'(size);
    ax.burst = burst;
    return ax;
  endfunction

  task automatic write(input id_t id, input addr_t a, input int unsigned len,
                       input int unsigned size, input logic [1:0] burst,
                       input data_t d[], input strb_t s[], output logic [1:0] bresp,
                       output id_t bid);
    fork
      begin
        req_o.aw       <= mk_ax(id, a, len, size, burst);
        req_o.aw_valid <= 1'b1;
        do @(posedge clk_i); while (!resp_i.aw_ready);
        req_o.aw_valid <= 1'b0;
      end
      begin
        for (int i = 0; i <= int'(len); i++) begin
          while (stall_pct != 0 && ($urandom % 100) < stall_pct) begin
            req_o.w_valid <= 1'b0;
            @(posedge clk_i);
          end
          req_o.w.data  <= d[i];
          req_o.w.strb  <= s[i];
          req_o.w.last  <= (i == int'(len));
          req_o.w_valid <= 1'b1;
          do @(posedge clk_i); while (!resp_i.w_ready);
          w_beats++;
        end
        req_o.w_valid <= 1'b0;
      end
    join
    req_o.b_ready <= 1'b1;
    do @(posedge clk_i); while (!resp_i.b_valid);
    bresp = resp_i.b.resp;
    bid   = resp_i.b.id;
    req_o.b_ready <= 1'b0;
  endtask

  task automatic read(input id_t id, input addr_t a, input int unsigned len,
                      input int unsigned size, input logic [1:0] burst,
                      output data_t d[], output logic [1:0] rresp, output logic last_ok,
                      output id_t rid);
    int   n;
    logic rdy;
    d       = new[len + 1];
    rresp   = RESP_OKAY;
    last_ok = 1'b1;
    rid     = '0;
    req_o.ar       <= mk_ax(id, a, len, size, burst);
    req_o.ar_valid <= 1'b1;
    do @(posedge clk_i); while (!resp_i.ar_ready);
    req_o.ar_valid <= 1'b0;
    n = 0;
    rdy = 1'b0;
    while (n <= int'(len)) begin
      rdy = !(stall_pct != 0 && ($urandom % 100) < stall_pct);
      req_o.r_ready <= rdy;
      @(posedge clk_i);
      if (resp_i.r_valid && !rdy) r_stalls++;
      if (resp_i.r_valid && rdy) begin
        d[n] = resp_i.r.data;
        if (resp_i.r.resp != RESP_OKAY) rresp = resp_i.r.resp;
        if (resp_i.r.last != (n == int'(len))) last_ok = 1'b0;
        rid = resp_i.r.id;
        n++;
        r_beats++;
      end
    end
    req_o.r_ready <= 1'b0;
  endtask

endmodule
