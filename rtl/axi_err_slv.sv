// axi_err_slv: AXI4 slave that answers every transaction with DECERR.
//
// The interconnect routes any address that hits none of its windows here, so
// that a stray access completes with an error instead of hanging the master.
// A write burst is accepted, its W beats are taken until WLAST, and one B
// response with DECERR follows. A read burst returns LEN+1 beats of zero data
// with DECERR, the last one with RLAST. One transaction per direction at a
// time; reads and writes are independent.
//
// Interface: s_req_i/s_resp_o (AXI4 slave, see spm_axi_pkg).
// Timing: B comes one cycle after WLAST; R beats start one cycle after AR.
//
// The decode-error behaviour follows the AXI4 specification; the original
// design does not describe it.
module axi_err_slv
  import spm_axi_pkg::*;
(
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axi_req_t  s_req_i,
  output axi_resp_t s_resp_o
);

  typedef enum logic [1:0] {W_IDLE, W_DATA, W_RESP} wstate_e;

  wstate_e    wst_q;
  id_t        wid_q, rid_q;
  logic       rbusy_q;
  logic [8:0] rleft_q;

  always_comb begin
    s_resp_o          = '0;
    s_resp_o.aw_ready = (wst_q == W_IDLE);
    s_resp_o.w_ready  = (wst_q == W_DATA);
    s_resp_o.b_valid  = (wst_q == W_RESP);
    s_resp_o.b.id     = wid_q;
    s_resp_o.b.resp   = RESP_DECERR;
    s_resp_o.ar_ready = !rbusy_q;
    s_resp_o.r_valid  = rbusy_q;
    s_resp_o.r.id     = rid_q;
    s_resp_o.r.resp   = RESP_DECERR;
    s_resp_o.r.last   = (rleft_q == 9'd1);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wst_q   <= W_IDLE;
      wid_q   <= '0;
      rid_q   <= '0;
      rbusy_q <= 1'b0;
      rleft_q <= '0;
    end else begin
      unique case (wst_q)
        W_IDLE: if (s_req_i.aw_valid) begin
          wid_q <= s_req_i.aw.id;
          wst_q <= W_DATA;
        end
        W_DATA: if (s_req_i.w_valid && s_req_i.w.last) wst_q <= W_RESP;
        W_RESP: if (s_req_i.b_ready) wst_q <= W_IDLE;
        default: wst_q <= W_IDLE;
      endcase
      if (!rbusy_q) begin
        if (s_req_i.ar_valid) begin
          rbusy_q <= 1'b1;
          rid_q   <= s_req_i.ar.id;
          rleft_q <= 9'(s_req_i.ar.len) + 9'd1;
        end
      end else if (s_req_i.r_ready) begin
        rleft_q <= rleft_q - 9'd1;
        if (rleft_q == 9'd1) rbusy_q <= 1'b0;
      end
    end
  end

endmodule
