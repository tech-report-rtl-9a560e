// spm_dpram: dual-ported scratchpad memory (block RAM in the programmable logic).
//
// Each real-time core owns one of these. Port A serves the core (through a
// colour-removing translator and a controller), port B serves the DMA engine
// (through its own controller), so a core executing from one half of its
// scratchpad never waits for the DMA loading or unloading the other half.
// Splitting the scratchpad into two partitions is done by software; the
// memory itself is one flat array of DEPTH words.
//
// Interface, per port: en (access this cycle), we (byte write enables),
// addr (word address), wdata, rdata.
//
// Timing: synchronous, one clock. A read returns the word in the cycle after
// en; rdata holds its value while en is low (like a block RAM output latch).
// Read-during-write on the same port returns the old word. If both ports
// write the same word in the same cycle, port B wins (block RAM leaves this
// case undefined; software never does it because the core and the DMA work
// on different partitions).
//
// Dual porting and the sizes (2 MB and 512 KB) follow the original design;
// the single common clock and the collision rule are this design's choices.
module spm_dpram #(
  parameter int unsigned BYTES = 2 * 1024 * 1024,
  parameter int unsigned DW    = 128,
  localparam int unsigned SW    = DW / 8,
  localparam int unsigned DEPTH = BYTES / SW,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk_i,
  // port A
  input  logic          a_en_i,
  input  logic [SW-1:0] a_we_i,
  input  logic [AW-1:0] a_addr_i,
  input  logic [DW-1:0] a_wdata_i,
  output logic [DW-1:0] a_rdata_o,
  // port B
  input  logic          b_en_i,
  input  logic [SW-1:0] b_we_i,
  input  logic [AW-1:0] b_addr_i,
  input  logic [DW-1:0] b_wdata_i,
  output logic [DW-1:0] b_rdata_o
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk_i) begin
    if (a_en_i) begin
      a_rdata_o <= mem[a_addr_i];
      for (int i = 0; i < SW; i++)
        if (a_we_i[i]) mem[a_addr_i][i*8 +: 8] <= a_wdata_i[i*8 +: 8];
    end
    if (b_en_i) begin
      b_rdata_o <= mem[b_addr_i];
      for (int i = 0; i < SW; i++)
        if (b_we_i[i]) mem[b_addr_i][i*8 +: 8] <= b_wdata_i[i*8 +: 8];
    end
  end

endmodule
