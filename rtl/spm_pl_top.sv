// spm_pl_top: programmable-logic scratchpad subsystem for three real-time cores.
//
// Three application cores run hard and mid-criticality tasks under a
// load / execute / unload model: while a task executes from one half of its
// core's private scratchpad, a DMA engine unloads the previous task from the
// other half and loads the next one. This block is the scratchpad side of
// that system. It holds three dual-ported scratchpads (SPM 0: 2 MB, SPM 1
// and SPM 2: 512 KB). Port A of each serves its core, port B serves the DMA.
//
//   HPM0 (dedicated core port) -+-> smc0 --> translator 0 --> ctrl 0 --> SPM 0 port A
//                               |        +-> ctrl 1 -------------------> SPM 0 port B
//   LPD (DMA port) -------------+        +-> smc3 -+-> ctrl 3 ---------> SPM 1 port B
//                                                  +-> ctrl 5 ---------> SPM 2 port B
//   HPM1 (port shared by two cores) --> smc1 -+-> translator 1 --> ctrl 2 --> SPM 1 port A
//                                             +-> translator 2 --> ctrl 4 --> SPM 2 port A
//
// The cores partition the shared cache by page colour, so a core's pages
// use one of four colours. The translators on the core paths delete the two
// colour bits (12 and 13) from the address, which makes every byte of a
// scratchpad reachable through pages of a single colour: each core window is
// four times its scratchpad. The DMA path needs no translation.
//
// Address map (PS byte addresses, see spm_axi_pkg):
//   0xA000_0000 + 8 MB  -> SPM 0 via translator (HPM0)
//   0xB000_0000 + 2 MB  -> SPM 1 via translator (HPM1)
//   0xB020_0000 + 2 MB  -> SPM 2 via translator (HPM1)
//   0x8000_0000 + 2 MB  -> SPM 0, DMA side (LPD)
//   0x8020_0000 + 512 K -> SPM 1, DMA side (LPD)
//   0x8028_0000 + 512 K -> SPM 2, DMA side (LPD)
// Any other address answers DECERR.
//
// Interface: one clock and an active-low asynchronous reset; three AXI4
// slave ports (structs from spm_axi_pkg) for the PS ports HPM0, HPM1 and LPD.
//
// Timing: one cycle through an interconnect, none through a translator; the
// controllers add one cycle of read latency and stream one beat per cycle.
//
// The topology, the scratchpad sizes, the dual porting with one controller
// per port and the colour-bit removal follow the original design. Which
// interconnect carries the DMA traffic to each scratchpad, the address
// windows other than the 8 MB one at 0xA000_0000, and the bus widths are
// this design's choices.
//
// Lint note: rst_ni also feeds the assertions' disable conditions in the
// controllers and interconnects, which a linter reports as a signal used
// both synchronously and asynchronously; no logic samples it.
module spm_pl_top
  import spm_axi_pkg::*;
#(
  parameter int unsigned SPM0_BYTES  = 2 * 1024 * 1024,  // dedicated-port core
  parameter int unsigned SPM12_BYTES = 512 * 1024,       // the two HPM1 cores
  parameter int unsigned COLOR_LSB   = 12,
  parameter int unsigned COLOR_W     = 2
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axi_req_t  hpm0_req_i,
  output axi_resp_t hpm0_resp_o,
  input  axi_req_t  hpm1_req_i,
  output axi_resp_t hpm1_resp_o,
  input  axi_req_t  lpd_req_i,
  output axi_resp_t lpd_resp_o
);

  localparam int unsigned SPM0_LOG  = $clog2(SPM0_BYTES);
  localparam int unsigned SPM12_LOG = $clog2(SPM12_BYTES);
  localparam addr_t SPM0_SZ   = addr_t'(SPM0_BYTES);
  localparam addr_t SPM12_SZ  = addr_t'(SPM12_BYTES);
  localparam addr_t WIN0_SZ   = SPM0_SZ << COLOR_W;
  localparam addr_t WIN12_SZ  = SPM12_SZ << COLOR_W;
  localparam addr_t LPD1_BASE = LPD_SPM0_BASE + SPM0_SZ;
  localparam addr_t LPD2_BASE = LPD1_BASE + SPM12_SZ;
  localparam addr_t HPM2_BASE = HPM1_SPM1_BASE + WIN12_SZ;

  // ------------------------------------------------------------ interconnects
  axi_req_t  smc0_s_req [2];
  axi_resp_t smc0_s_resp[2];
  axi_req_t  smc0_m_req [3];
  axi_resp_t smc0_m_resp[3];
  axi_req_t  smc1_s_req [1];
  axi_resp_t smc1_s_resp[1];
  axi_req_t  smc1_m_req [2];
  axi_resp_t smc1_m_resp[2];
  axi_req_t  smc3_s_req [1];
  axi_resp_t smc3_s_resp[1];
  axi_req_t  smc3_m_req [2];
  axi_resp_t smc3_m_resp[2];

  assign smc0_s_req[0] = hpm0_req_i;
  assign smc0_s_req[1] = lpd_req_i;
  assign hpm0_resp_o   = smc0_s_resp[0];
  assign lpd_resp_o    = smc0_s_resp[1];
  assign smc1_s_req[0] = hpm1_req_i;
  assign hpm1_resp_o   = smc1_s_resp[0];

  // smc0: HPM0 + LPD -> translator 0, ctrl 1, smc3
  axi_smc #(
    .N_S  (2),
    .N_M  (3),
    .BASE ({LPD1_BASE, LPD_SPM0_BASE, HPM0_SPM0_BASE}),
    .SIZE ({SPM12_SZ << 1, SPM0_SZ, WIN0_SZ})
  ) u_smc0 (
    .clk_i, .rst_ni,
    .s_req_i  (smc0_s_req),
    .s_resp_o (smc0_s_resp),
    .m_req_o  (smc0_m_req),
    .m_resp_i (smc0_m_resp)
  );

  // smc3: DMA link -> ctrl 3, ctrl 5
  assign smc3_s_req[0]  = smc0_m_req[2];
  assign smc0_m_resp[2] = smc3_s_resp[0];

  axi_smc #(
    .N_S  (1),
    .N_M  (2),
    .BASE ({LPD2_BASE, LPD1_BASE}),
    .SIZE ({SPM12_SZ, SPM12_SZ})
  ) u_smc3 (
    .clk_i, .rst_ni,
    .s_req_i  (smc3_s_req),
    .s_resp_o (smc3_s_resp),
    .m_req_o  (smc3_m_req),
    .m_resp_i (smc3_m_resp)
  );

  // smc1: HPM1 -> translator 1, translator 2
  axi_smc #(
    .N_S  (1),
    .N_M  (2),
    .BASE ({HPM2_BASE, HPM1_SPM1_BASE}),
    .SIZE ({WIN12_SZ, WIN12_SZ})
  ) u_smc1 (
    .clk_i, .rst_ni,
    .s_req_i  (smc1_s_req),
    .s_resp_o (smc1_s_resp),
    .m_req_o  (smc1_m_req),
    .m_resp_i (smc1_m_resp)
  );

  // ------------------------------------------------------------ translators
  // core-side request into each controller, index = controller number / 2
  axi_req_t  core_req [3];
  axi_resp_t core_resp[3];

  axi_translator #(.IN_W(SPM0_LOG + COLOR_W), .COLOR_LSB(COLOR_LSB), .COLOR_W(COLOR_W))
  u_trans0 (
    .clk_i, .rst_ni,
    .s_req_i (smc0_m_req[0]), .s_resp_o (smc0_m_resp[0]),
    .m_req_o (core_req[0]),   .m_resp_i (core_resp[0])
  );

  axi_translator #(.IN_W(SPM12_LOG + COLOR_W), .COLOR_LSB(COLOR_LSB), .COLOR_W(COLOR_W))
  u_trans1 (
    .clk_i, .rst_ni,
    .s_req_i (smc1_m_req[0]), .s_resp_o (smc1_m_resp[0]),
    .m_req_o (core_req[1]),   .m_resp_i (core_resp[1])
  );

  axi_translator #(.IN_W(SPM12_LOG + COLOR_W), .COLOR_LSB(COLOR_LSB), .COLOR_W(COLOR_W))
  u_trans2 (
    .clk_i, .rst_ni,
    .s_req_i (smc1_m_req[1]), .s_resp_o (smc1_m_resp[1]),
    .m_req_o (core_req[2]),   .m_resp_i (core_resp[2])
  );

  // DMA-side request into each controller
  axi_req_t  dma_req [3];
  axi_resp_t dma_resp[3];

  assign dma_req[0]     = smc0_m_req[1];
  assign smc0_m_resp[1] = dma_resp[0];
  assign dma_req[1]     = smc3_m_req[0];
  assign smc3_m_resp[0] = dma_resp[1];
  assign dma_req[2]     = smc3_m_req[1];
  assign smc3_m_resp[1] = dma_resp[2];

  // ------------------------------------------------------------ scratchpads
  for (genvar k = 0; k < 3; k++) begin : g_spm
    localparam int unsigned BYTES = (k == 0) ? SPM0_BYTES : SPM12_BYTES;
    localparam int unsigned MAW   = $clog2(BYTES / AXI_SW);

    logic           a_en, b_en;
    strb_t          a_we, b_we;
    logic [MAW-1:0] a_addr, b_addr;
    data_t          a_wdata, b_wdata, a_rdata, b_rdata;

    // controller 2k: core side (port A)
    axi_bram_ctrl #(.MEM_BYTES(BYTES)) u_ctrl_core (
      .clk_i, .rst_ni,
      .s_req_i     (core_req[k]),
      .s_resp_o    (core_resp[k]),
      .ram_en_o    (a_en),
      .ram_we_o    (a_we),
      .ram_addr_o  (a_addr),
      .ram_wdata_o (a_wdata),
      .ram_rdata_i (a_rdata)
    );

    // controller 2k+1: DMA side (port B)
    axi_bram_ctrl #(.MEM_BYTES(BYTES)) u_ctrl_dma (
      .clk_i, .rst_ni,
      .s_req_i     (dma_req[k]),
      .s_resp_o    (dma_resp[k]),
      .ram_en_o    (b_en),
      .ram_we_o    (b_we),
      .ram_addr_o  (b_addr),
      .ram_wdata_o (b_wdata),
      .ram_rdata_i (b_rdata)
    );

    spm_dpram #(.BYTES(BYTES), .DW(AXI_DW)) u_spm (
      .clk_i,
      .a_en_i (a_en), .a_we_i (a_we), .a_addr_i (a_addr), .a_wdata_i (a_wdata), .a_rdata_o (a_rdata),
      .b_en_i (b_en), .b_we_i (b_we), .b_addr_i (b_addr), .b_wdata_i (b_wdata), .b_rdata_o (b_rdata)
    );
  end

endmodule
