// tb_spm_dpram: self-checking test of the dual-ported scratchpad RAM.
//
// Runs at the default 2 MB size. Both ports access a pool of 64 word
// addresses spread over the whole array, at random, every cycle, with random
// byte enables; a reference model (an associative array of words) predicts
// every read. Checked: one-cycle read latency, read-before-write on a port,
// byte enables, output hold while the port is idle, visibility of one
// port's writes on the other port, and port B winning a same-word collision.
module tb_spm_dpram;

  localparam int unsigned BYTES = 2 * 1024 * 1024;
  localparam int unsigned DW    = 128;
  localparam int unsigned SW    = DW / 8;
  localparam int unsigned AW    = $clog2(BYTES / SW);

  logic          clk = 1'b0;
  logic          a_en, b_en;
  logic [SW-1:0] a_we, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  spm_dpram dut (
    .clk_i (clk),
    .a_en_i (a_en), .a_we_i (a_we), .a_addr_i (a_addr), .a_wdata_i (a_wdata), .a_rdata_o (a_rdata),
    .b_en_i (b_en), .b_we_i (b_we), .b_addr_i (b_addr), .b_wdata_i (b_wdata), .b_rdata_o (b_rdata)
  );

  logic [DW-1:0] model [int];
  logic [AW-1:0] pool [64];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [DW-1:0] merge(logic [DW-1:0] old, logic [DW-1:0] nw, logic [SW-1:0] be);
    logic [DW-1:0] r;
    r = old;
    for (int i = 0; i < SW; i++) if (be[i]) r[i*8 +: 8] = nw[i*8 +: 8];
    return r;
  endfunction

  function automatic logic [DW-1:0] rnd_word();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] exp_a, exp_b, hold_a;
    logic          chk_a, chk_b;
    a_en = 0; b_en = 0; a_we = '0; b_we = '0; a_addr = '0; b_addr = '0;
    a_wdata = '0; b_wdata = '0;
    for (int i = 0; i < 64; i++) pool[i] = AW'($urandom);
    pool[0] = '0;
    pool[1] = '1;
    // initialise the pool through alternating ports
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      if (i % 2 == 0) begin
        a_en = 1; a_we = '1; a_addr = pool[i]; a_wdata = rnd_word(); b_en = 0;
        model[int'(pool[i])] = a_wdata;
      end else begin
        b_en = 1; b_we = '1; b_addr = pool[i]; b_wdata = rnd_word(); a_en = 0;
        model[int'(pool[i])] = b_wdata;
      end
    end
    @(negedge clk);
    a_en = 0; b_en = 0;

    // random dual-port traffic
    chk_a = 0; chk_b = 0;
    for (int n = 0; n < 20000; n++) begin
      logic [AW-1:0] aa, ba;
      logic [SW-1:0] awe, bwe;
      logic [DW-1:0] awd, bwd;
      logic          ae, be;
      @(negedge clk);
      // outputs for the previous cycle's reads
      if (chk_a) check(a_rdata == exp_a, $sformatf("port A read %h", a_addr));
      if (chk_b) check(b_rdata == exp_b, $sformatf("port B read %h", b_addr));
      if (!chk_a && n > 0 && !a_en) check(a_rdata == hold_a, "port A output holds while idle");
      hold_a = a_rdata;
      ae  = ($urandom % 4) != 0;
      be  = ($urandom % 4) != 0;
      aa  = pool[$urandom % 64];
      ba  = (($urandom % 8) == 0) ? aa : pool[$urandom % 64];
      awe = (($urandom % 2) == 0) ? '0 : SW'($urandom);
      bwe = (($urandom % 2) == 0) ? '0 : SW'($urandom);
      awd = rnd_word();
      bwd = rnd_word();
      a_en = ae; a_addr = aa; a_we = awe; a_wdata = awd;
      b_en = be; b_addr = ba; b_we = bwe; b_wdata = bwd;
      // reference: reads return the word before this cycle's writes
      exp_a = model[int'(aa)];
      exp_b = model[int'(ba)];
      chk_a = ae;
      chk_b = be;
      if (ae && awe != '0) model[int'(aa)] = merge(model[int'(aa)], awd, awe);
      if (be && bwe != '0) model[int'(ba)] = merge(model[int'(ba)], bwd, bwe);
    end
    @(negedge clk);
    a_en = 0; b_en = 0;
    @(negedge clk);
    // final sweep of the whole pool through port A
    for (int i = 0; i < 64; i++) begin
      a_en = 1; a_we = '0; a_addr = pool[i];
      @(negedge clk);
      check(a_rdata == model[int'(pool[i])], $sformatf("final word %h", pool[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
