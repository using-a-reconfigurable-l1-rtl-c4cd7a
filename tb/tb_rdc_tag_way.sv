// tb_rdc_tag_way: tag array of one way. Checks the TMM index multiplexer
// (general purpose: 256 entries by A13..A6; TM: top half only, A13 ignored),
// hit = valid and tag equal, and the flash VSC/write-set operations.
module tb_rdc_tag_way;
  import rdc_pkg::*;
  logic             clk = 0, rst_n = 0;
  logic             tmm;
  logic [7:0]       idx;
  logic [TAG_W-1:0] cmp_tag;
  tag_entry_t       rd_entry, wentry;
  logic             hit, we, set_vsc_all, clr_vsc_all, clr_txw_all;
  tag_entry_t       m [256];
  int checks = 0, failures = 0;

  rdc_tag_way dut (.*);

  always #5 clk = ~clk;

  task automatic wr(input logic t, input logic [7:0] i, input tag_entry_t e);
    @(negedge clk); tmm = t; idx = i; wentry = e; we = 1;
    @(posedge clk); #1; we = 0;
    m[t ? {1'b0, i[6:0]} : i] = e;
  endtask

  task automatic chk(input logic t, input logic [7:0] i, input logic [TAG_W-1:0] tg);
    tag_entry_t e;
    @(negedge clk); tmm = t; idx = i; cmp_tag = tg; #1;
    e = m[t ? {1'b0, i[6:0]} : i];
    checks++;
    if (rd_entry !== e || hit !== (e.valid && e.tag == tg)) begin
      failures++;
      $display("FAIL tmm=%0d idx=%0d hit=%0d", t, i, hit);
    end
  endtask

  function automatic tag_entry_t rnd_entry();
    tag_entry_t e;
    e.valid = $urandom_range(0, 3) != 0;
    e.dirty = 1'($urandom);
    e.txw   = 1'($urandom);
    e.vsc   = 1'($urandom);
    e.tag   = {3'($urandom), $urandom};
    return e;
  endfunction

  initial begin
    we = 0; set_vsc_all = 0; clr_vsc_all = 0; clr_txw_all = 0; tmm = 0; idx = 0;
    cmp_tag = '0; wentry = '0;
    for (int i = 0; i < 256; i++) m[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i += 15) chk(0, i[7:0], '0);  // reset: all invalid
    for (int i = 0; i < 256; i++) wr(0, i[7:0], rnd_entry());
    for (int i = 0; i < 256; i++) begin
      chk(0, i[7:0], m[i].tag);
      chk(0, i[7:0], m[i].tag ^ 35'h1);
    end
    // TM mode: index A13 must not matter
    for (int n = 0; n < 100; n++) begin
      logic [7:0] i = 8'($urandom);
      tag_entry_t e = rnd_entry();
      wr(1, i, e);
      chk(1, i ^ 8'h80, e.tag);
      chk(0, {1'b0, i[6:0]}, e.tag);
    end
    // flash operations
    @(negedge clk); set_vsc_all = 1; @(posedge clk); #1; set_vsc_all = 0;
    for (int i = 0; i < 256; i++) m[i].vsc = 1'b1;
    for (int i = 0; i < 256; i += 7) chk(0, i[7:0], m[i].tag);
    @(negedge clk); clr_vsc_all = 1; clr_txw_all = 1; @(posedge clk); #1;
    clr_vsc_all = 0; clr_txw_all = 0;
    for (int i = 0; i < 256; i++) begin m[i].vsc = 1'b0; m[i].txw = 1'b0; end
    for (int i = 0; i < 256; i += 5) chk(0, i[7:0], m[i].tag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
