// spm_axi_pkg: types and constants shared by the scratchpad subsystem.
//
// Every AXI4 link in the subsystem (PS master ports, interconnect outputs,
// translator outputs, BRAM controller inputs) carries the same bundle, so it
// is described once here as a request struct (master to slave) and a
// response struct (slave to master). Channel payloads are packed structs so
// that a whole channel can be registered or multiplexed as one value.
//
// Widths: the address is 40 bits wide, as on the Zynq UltraScale+ PS-PL
// ports; the data path is 128 bits wide and IDs are 6 bits. These three
// widths are this design's choice; the address map constants below follow
// the 8 MB window at 0xA000_0000 used for the dedicated-port scratchpad, and
// the other two windows are this design's choice.
//
// Lint note: some constants (response codes, base addresses) are here for
// the users of the package and are not read by every module.
package spm_axi_pkg;

  localparam int unsigned AXI_AW  = 40;
  localparam int unsigned AXI_DW  = 128;
  localparam int unsigned AXI_IDW = 6;
  localparam int unsigned AXI_SW  = AXI_DW / 8;

  typedef logic [AXI_AW-1:0]  addr_t;
  typedef logic [AXI_DW-1:0]  data_t;
  typedef logic [AXI_SW-1:0]  strb_t;
  typedef logic [AXI_IDW-1:0] id_t;

  // AXI4 burst types and response codes
  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } burst_e;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  // Address channel payload (shared by AW and AR)
  typedef struct packed {
    id_t         id;
    addr_t       addr;
    logic [7:0]  len;    // beats - 1
    logic [2:0]  size;   // log2(bytes per beat)
    logic [1:0]  burst;  // burst_e encoding
  } ax_t;

  typedef struct packed {
    data_t data;
    strb_t strb;
    logic  last;
  } w_t;

  typedef struct packed {
    id_t        id;
    logic [1:0] resp;
  } b_t;

  typedef struct packed {
    id_t        id;
    data_t      data;
    logic [1:0] resp;
    logic       last;
  } r_t;

  // Master -> slave
  typedef struct packed {
    ax_t  aw;
    logic aw_valid;
    w_t   w;
    logic w_valid;
    logic b_ready;
    ax_t  ar;
    logic ar_valid;
    logic r_ready;
  } axi_req_t;

  // Slave -> master
  typedef struct packed {
    logic aw_ready;
    logic w_ready;
    b_t   b;
    logic b_valid;
    logic ar_ready;
    r_t   r;
    logic r_valid;
  } axi_resp_t;

  // Address map of the subsystem (byte addresses as seen by the PS)
  // Core side, through the colour-removing translators: each window is four
  // times the scratchpad it reaches.
  localparam addr_t HPM0_SPM0_BASE = 40'h00_A000_0000; // 8 MB -> 2 MB SPM 0
  localparam addr_t HPM1_SPM1_BASE = 40'h00_B000_0000; // 2 MB -> 512 KB SPM 1
  //                                   0xB020_0000      // 2 MB -> 512 KB SPM 2
  // DMA side (LPD port), no translation: each window is the scratchpad size.
  localparam addr_t LPD_SPM0_BASE  = 40'h00_8000_0000; // 2 MB
  //                                   0x8020_0000      // 512 KB SPM 1
  //                                   0x8028_0000      // 512 KB SPM 2
  // (the later windows follow the first one; spm_pl_top derives them from
  // the scratchpad sizes)

  // Next address of a burst beat (AXI4 rules for FIXED, INCR and WRAP).
  // Only the low 12 bits can change: a burst never crosses a 4 KB page.
  function automatic addr_t axi_next_addr(addr_t a, logic [7:0] len,
                                          logic [2:0] size, logic [1:0] burst);
    addr_t step;
    addr_t nxt;
    addr_t wrap_bytes;
    addr_t wrap_mask;
    step = addr_t'(1) << size;
    nxt  = (a & ~(step - 1)) + step;
    case (burst)
      BURST_FIXED: axi_next_addr = a;
      BURST_WRAP: begin
        wrap_bytes = (addr_t'(len) + 1) << size;
        wrap_mask  = wrap_bytes - 1;
        axi_next_addr = (a & ~wrap_mask) | (nxt & wrap_mask);
      end
      default: axi_next_addr = nxt;
    endcase
  endfunction

endpackage
