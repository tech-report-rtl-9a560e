// axi_translator: removes cache-colour bits from AXI4 addresses.
//
// The application cores partition the shared last-level cache by page
// colouring, so each core only ever uses physical pages of one colour. If the
// scratchpad were mapped 1:1 into the physical address space, a core could
// reach only one page in every 2**COLOR_W of it. This block sits between a PS
// master port and a scratchpad controller and makes the whole scratchpad
// reachable: the PS side sees a window 2**COLOR_W times the scratchpad size,
// and the block deletes address bits [COLOR_LSB +: COLOR_W] (the colour bits)
// so that the pages of one colour land contiguously on the scratchpad.
//
//   out = { in[IN_W-1 : COLOR_LSB+COLOR_W], in[COLOR_LSB-1 : 0] }
//
// With the defaults (8 MB window, colour bits 12 and 13) the PS address
// 0xA002_3456 becomes scratchpad offset 0x00_8456.
//
// Interface: one AXI4 slave port (s_req/s_resp) towards the PS and one AXI4
// master port (m_req/m_resp) towards the controller. All channels pass
// straight through; only AWADDR and ARADDR are rewritten, and the bits above
// the scratchpad offset are driven to zero.
//
// Timing: purely combinational, zero added latency and full bandwidth. Bursts
// are translated by their start address only. This is exact because an AXI4
// burst never crosses a 4 KB boundary, so the beats of a burst never change
// bits at or above COLOR_LSB (which must therefore be 12 or more).
//
// The bit positions, the widths and the example follow the original design
// description; the combinational (register-free) implementation and the
// zeroing of the upper bits are this design's choices.
//
// Lint note: the colour bits and the bits above the window are unused by
// design, as are the request fields the address function does not look at.
module axi_translator
  import spm_axi_pkg::*;
#(
  parameter int unsigned IN_W      = 23,  // window size as log2(bytes): 8 MB
  parameter int unsigned COLOR_LSB = 12,  // lowest colour bit
  parameter int unsigned COLOR_W   = 2    // number of colour bits (4 colours)
) (
  input  logic      clk_i,    // used only by the assertions
  input  logic      rst_ni,
  input  axi_req_t  s_req_i,
  output axi_resp_t s_resp_o,
  output axi_req_t  m_req_o,
  input  axi_resp_t m_resp_i
);

  localparam int unsigned OUT_W = IN_W - COLOR_W;

  function automatic addr_t strip_color(addr_t a);
    addr_t o;
    o = '0;
    o[COLOR_LSB-1:0]     = a[COLOR_LSB-1:0];
    o[OUT_W-1:COLOR_LSB] = a[IN_W-1:COLOR_LSB+COLOR_W];
    return o;
  endfunction

  always_comb begin
    m_req_o         = s_req_i;
    m_req_o.aw.addr = strip_color(s_req_i.aw.addr);
    m_req_o.ar.addr = strip_color(s_req_i.ar.addr);
    s_resp_o        = m_resp_i;
  end

  // The translation is exact only if no burst crosses a 4 KB page.
  function automatic logic crosses_page(ax_t ax);
    logic [12:0] first_b;
    logic [12:0] span;
    first_b = {1'b0, ax.addr[11:0]};
    span    = (13'(ax.len) + 13'd1) << ax.size;
    return (ax.burst == BURST_INCR) && ((first_b + span - 13'd1) > 13'hFFF);
  endfunction

  initial begin
    assert (COLOR_LSB >= 12) else $error("colour bits must lie above the 4 KB page offset");
    assert (IN_W > COLOR_LSB + COLOR_W) else $error("window too small for the colour bits");
  end

  a_aw_in_page: assert property (@(posedge clk_i) disable iff (!rst_ni)
    s_req_i.aw_valid |-> !crosses_page(s_req_i.aw))
    else $error("AW burst crosses a 4 KB boundary");
  a_ar_in_page: assert property (@(posedge clk_i) disable iff (!rst_ni)
    s_req_i.ar_valid |-> !crosses_page(s_req_i.ar))
    else $error("AR burst crosses a 4 KB boundary");

endmodule
