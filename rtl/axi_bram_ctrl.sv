// axi_bram_ctrl: AXI4 slave that drives one port of a scratchpad block RAM.
//
// Two of these sit on every scratchpad, one per RAM port: one for the core
// path and one for the DMA path. Because each master has its own controller
// and its own RAM port, core and DMA traffic never contend inside a
// controller.
//
// Operation: the controller serves one burst at a time. When idle it accepts
// an AW or an AR; if both are waiting it alternates between them. A write
// burst takes one W beat per cycle and writes it, with its byte strobes, at
// the beat address; after WLAST it returns one OKAY response on B. A read
// burst issues one RAM read per cycle and returns the data on R one cycle
// later, with RLAST on the final beat; RREADY low stalls the RAM reads, so
// no data is lost and full rate resumes at once. FIXED, INCR and WRAP bursts
// and narrow transfers are supported; beat addresses follow the AXI4 rules.
// Address bits above the RAM size are ignored (the interconnect decodes).
//
// Interface: s_req_i/s_resp_o (AXI4 slave, see spm_axi_pkg) and a RAM port
// (ram_en_o, ram_we_o, ram_addr_o, ram_wdata_o, ram_rdata_i) with one cycle
// read latency.
//
// Timing: a write burst of N beats occupies the controller 1 + N cycles
// plus the B handshake; a read burst of N beats returns its first beat two
// cycles after AR is accepted and then one beat per cycle.
//
// The original design uses a stock controller and names only its role; the
// single-burst-at-a-time scheme and the read/write alternation are this
// design's choices.
//
// Lint note: rst_ni is the asynchronous reset of every register and also
// appears in the assertions' disable condition, which a linter reports as a
// signal used both synchronously and asynchronously; no logic samples it.
module axi_bram_ctrl
  import spm_axi_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 2 * 1024 * 1024,
  localparam int unsigned DEPTH = MEM_BYTES / AXI_SW,
  localparam int unsigned MAW   = $clog2(DEPTH),
  localparam int unsigned OFS   = $clog2(AXI_SW)
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  axi_req_t        s_req_i,
  output axi_resp_t       s_resp_o,
  output logic            ram_en_o,
  output strb_t           ram_we_o,
  output logic [MAW-1:0]  ram_addr_o,
  output data_t           ram_wdata_o,
  input  data_t           ram_rdata_i
);

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_BRESP, S_READ} state_e;

  state_e     state_q;
  ax_t        ax_q;          // current burst, addr is the next beat's address
  logic [8:0] left_q;        // read beats still to issue to the RAM
  logic       rvalid_q;      // a read beat is on R
  logic       rlast_q;
  logic       last_wr_q;     // last burst served was a write

  logic take_aw, take_ar, w_hs, r_issue, r_hs;

  always_comb begin
    take_aw = 1'b0;
    take_ar = 1'b0;
    if (state_q == S_IDLE) begin
      if (s_req_i.aw_valid && (!s_req_i.ar_valid || !last_wr_q)) take_aw = 1'b1;
      else if (s_req_i.ar_valid)                                   take_ar = 1'b1;
    end
  end

  assign w_hs    = (state_q == S_WRITE) && s_req_i.w_valid;
  assign r_hs    = rvalid_q && s_req_i.r_ready;
  assign r_issue = (state_q == S_READ) && (left_q != '0) && (!rvalid_q || s_req_i.r_ready);

  // RAM port
  always_comb begin
    ram_en_o    = w_hs || r_issue;
    ram_we_o    = w_hs ? s_req_i.w.strb : '0;
    ram_addr_o  = ax_q.addr[OFS +: MAW];
    ram_wdata_o = s_req_i.w.data;
  end

  // AXI response side
  always_comb begin
    s_resp_o          = '0;
    s_resp_o.aw_ready = take_aw;
    s_resp_o.ar_ready = take_ar;
    s_resp_o.w_ready  = (state_q == S_WRITE);
    s_resp_o.b_valid  = (state_q == S_BRESP);
    s_resp_o.b.id     = ax_q.id;
    s_resp_o.b.resp   = RESP_OKAY;
    s_resp_o.r_valid  = rvalid_q;
    s_resp_o.r.id     = ax_q.id;
    s_resp_o.r.data   = ram_rdata_i;
    s_resp_o.r.resp   = RESP_OKAY;
    s_resp_o.r.last   = rlast_q;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q   <= S_IDLE;
      ax_q      <= '0;
      left_q    <= '0;
      rvalid_q  <= 1'b0;
      rlast_q   <= 1'b0;
      last_wr_q <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (take_aw) begin
            ax_q      <= s_req_i.aw;
            state_q   <= S_WRITE;
            last_wr_q <= 1'b1;
          end else if (take_ar) begin
            ax_q      <= s_req_i.ar;
            left_q    <= 9'(s_req_i.ar.len) + 9'd1;
            state_q   <= S_READ;
            last_wr_q <= 1'b0;
          end
        end
        S_WRITE: begin
          if (w_hs) begin
            ax_q.addr <= axi_next_addr(ax_q.addr, ax_q.len, ax_q.size, ax_q.burst);
            if (s_req_i.w.last) state_q <= S_BRESP;
          end
        end
        S_BRESP: begin
          if (s_req_i.b_ready) state_q <= S_IDLE;
        end
        S_READ: begin
          if (r_issue) begin
            ax_q.addr <= axi_next_addr(ax_q.addr, ax_q.len, ax_q.size, ax_q.burst);
            left_q    <= left_q - 9'd1;
            rvalid_q  <= 1'b1;
            rlast_q   <= (left_q == 9'd1);
          end else if (r_hs) begin
            rvalid_q  <= 1'b0;
          end
          if (r_hs && rlast_q) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // AXI handshake rules on the outputs: a valid stays up until taken
  a_b_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    s_resp_o.b_valid && !s_req_i.b_ready |=> s_resp_o.b_valid)
    else $error("BVALID dropped before BREADY");
  a_r_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    s_resp_o.r_valid && !s_req_i.r_ready |=> s_resp_o.r_valid && $stable(s_resp_o.r))
    else $error("R beat changed before RREADY");

endmodule
