// tb_rdc_l1d: end-to-end test of the reconfigurable L1 data cache at its full
// size (64KB / 32KB, 4 ways, 64-byte lines), once with the eager and once with
// the lazy version-management policy.
//
// The testbench holds a behavioural next level (L2): committed lines, plus a
// separate set of transactionally spilled lines that is published on commit
// and dropped on abort. For the eager policy it also plays the software abort
// handler: log entries received during a transaction are written back into
// the committed store when an abort reports the overflow bit.
//
// A word-level reference keeps the committed memory image and the current
// transaction's writes. Every load result is compared with it; forwarded
// requests are compared with the committed image. Addresses come from a small
// pool of lines that collide in the same sets, so evictions, logging, shadow
// write-backs and refetches of spilled lines happen often. Each sequence:
//   general purpose mode traffic -> switch to TM mode (flush) -> transactions
//   that commit or abort, with non-transactional traffic and forwarded
//   requests in between -> switch back to general purpose mode -> check.
// Hits must respond two cycles after the request is taken. Each mechanism of
// the design is counted and must have happened at least once.
module tb_rdc_l1d;
  import rdc_pkg::*;

  logic                  clk = 0, rst_n = 0;
  logic                  lazy;
  logic [ADDR_W-1:0]     log_base, log_limit;
  logic                  req_valid, req_ready, req_tmm;
  req_op_e               req_op;
  logic [ADDR_W-1:0]     req_addr;
  logic [WORD_W-1:0]     req_wdata;
  logic [WORD_BYTES-1:0] req_be;
  logic                  rsp_valid, rsp_overflow, tmm, in_tx;
  logic [WORD_W-1:0]     rsp_rdata;
  logic                  mem_req_valid, mem_req_ready;
  mem_cmd_e              mem_req_cmd;
  logic [ADDR_W-1:0]     mem_req_addr;
  logic [LINE_W-1:0]     mem_req_data;
  logic                  mem_rsp_valid, mem_rsp_txmod;
  logic [LINE_W-1:0]     mem_rsp_data;
  logic                  log_valid, log_ready;
  logic [ADDR_W-1:0]     log_addr;
  logic [LINE_W-1:0]     log_data;
  logic                  fwd_valid, fwd_ready, fwd_rsp_valid, fwd_rsp_hit, fwd_rsp_nack;
  logic [ADDR_W-1:0]     fwd_addr;
  logic [LINE_W-1:0]     fwd_rsp_data;
  rdc_events_t           ev;

  rdc_l1d dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------------ reference data
  function automatic logic [WORD_W-1:0] init_word(input logic [ADDR_W-1:0] wa);
    return {wa[31:0] ^ 32'h5a5a_0f0f, ~wa[31:0]};
  endfunction

  // committed memory image and transactional overlay, per 8-byte word
  logic [WORD_W-1:0] gold [logic [ADDR_W-1:0]];
  logic [WORD_W-1:0] spec [logic [ADDR_W-1:0]];

  function automatic logic [WORD_W-1:0] gold_rd(input logic [ADDR_W-1:0] wa);
    if (gold.exists(wa)) return gold[wa];
    return init_word(wa);
  endfunction

  function automatic logic [WORD_W-1:0] view_rd(input logic [ADDR_W-1:0] wa);
    if (spec.exists(wa)) return spec[wa];
    return gold_rd(wa);
  endfunction

  // ------------------------------------------------------------ next level model
  logic [LINE_W-1:0] l2_c [logic [ADDR_W-1:0]];   // committed lines
  logic [LINE_W-1:0] l2_t [logic [ADDR_W-1:0]];   // transactionally spilled lines

  function automatic logic [LINE_W-1:0] l2_line(input logic [ADDR_W-1:0] la);
    logic [LINE_W-1:0] d;
    if (l2_c.exists(la)) return l2_c[la];
    for (int k = 0; k < 8; k++) d[k*64 +: 64] = init_word(la + ADDR_W'(k * 8));
    return d;
  endfunction

  // pending log entries of the running transaction (eager)
  logic [ADDR_W-1:0] log_a [$];
  logic [LINE_W-1:0] log_d [$];

  int fill_wait;
  logic fill_pend;
  logic [ADDR_W-1:0] fill_addr;

  always @(posedge clk) if (rst_n) begin
    if (mem_req_valid && mem_req_ready) begin
      case (mem_req_cmd)
        MEM_READ: begin
          fill_pend <= 1'b1;
          fill_addr <= mem_req_addr;
          fill_wait <= $urandom_range(2, 6);
        end
        MEM_WRITE:    l2_c[mem_req_addr] = mem_req_data;
        MEM_WRITE_TX: l2_t[mem_req_addr] = mem_req_data;
        default: ;
      endcase
    end
    if (log_valid && log_ready) begin
      log_a.push_back(log_addr);
      log_d.push_back(log_data);
    end
    if (fill_pend && !mem_rsp_valid) begin
      if (fill_wait == 0) fill_pend <= 1'b0;
      else fill_wait <= fill_wait - 1;
    end
  end

  always_comb begin
    mem_rsp_valid = fill_pend && (fill_wait == 0);
    mem_rsp_txmod = l2_t.exists(fill_addr);
    mem_rsp_data  = mem_rsp_txmod ? l2_t[fill_addr] : l2_line(fill_addr);
  end

  always @(negedge clk) begin
    mem_req_ready <= ($urandom_range(0, 3) != 0);
    log_ready     <= ($urandom_range(0, 2) != 0);
  end

  // ------------------------------------------------------------ event counters
  int n_hit, n_miss, n_storeall, n_ulwrite, n_uwfill, n_store, n_restore, n_inval,
      n_vscclr, n_log, n_shwb, n_spill, n_evwb, n_lread, n_nack, n_flwb, n_mode,
      n_ovf_abort, n_commit, n_abort, n_fwd_hit;
  always @(posedge clk) if (rst_n) begin
    n_hit      += int'(ev.hit);
    n_miss     += int'(ev.miss);
    n_storeall += int'(ev.storeall);
    n_ulwrite  += int'(ev.ulwrite);
    n_uwfill   += int'(ev.uwrite_fill);
    n_store    += int'(ev.store);
    n_restore  += int'(ev.restore);
    n_inval    += int'(ev.abort_inval);
    n_vscclr   += int'(ev.vsc_clear);
    n_shwb     += int'(ev.shadow_wb);
    n_spill    += int'(ev.spill_tx);
    n_evwb     += int'(ev.evict_wb);
    n_lread    += int'(ev.fwd_lread);
    n_nack     += int'(ev.fwd_nack);
    n_flwb     += int'(ev.flush_wb);
    n_mode     += int'(ev.mode_switch);
  end

  // log writes are counted at the log port
  always @(posedge clk) if (rst_n && log_valid && log_ready) n_log++;
  // fills of lines the next level reports as transactionally modified
  int n_txfill;
  always @(posedge clk) if (rst_n && mem_rsp_valid && mem_rsp_txmod) n_txfill++;

  // ------------------------------------------------------------ drivers
  task automatic cpu(input req_op_e op, input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] d,
                     input logic [WORD_BYTES-1:0] be, input logic newtmm,
                     output logic [WORD_W-1:0] rd, output logic ovf, output int lat,
                     output logic missed);
    longint t0;
    @(negedge clk);
    req_valid = 1; req_op = op; req_addr = a; req_wdata = d; req_be = be; req_tmm = newtmm;
    do @(posedge clk); while (!req_ready);
    t0 = cycle;
    missed = 0;
    #1 req_valid = 0;
    do begin
      @(posedge clk);
      if (ev.miss) missed = 1;
    end while (!rsp_valid);
    rd = rsp_rdata; ovf = rsp_overflow; lat = int'(cycle - t0);
  endtask

  function automatic logic [ADDR_W-1:0] pool_addr();
    // 3 TM sets x 10 lines; in general purpose mode 6 sets x 5 lines
    int s = $urandom_range(0, 2);
    int t = $urandom_range(0, 9);
    int w = $urandom_range(0, 7);
    return 48'h0040_0000 + ADDR_W'(t << 13) + ADDR_W'(s << 6) + ADDR_W'(w << 3);
  endfunction

  task automatic do_load(input logic [ADDR_W-1:0] a);
    logic [WORD_W-1:0] rd; logic ovf, missed; int lat;
    cpu(REQ_LOAD, a, '0, '0, 0, rd, ovf, lat, missed);
    check(rd == view_rd(a), $sformatf("load %h got %h exp %h", a, rd, view_rd(a)));
    if (!missed) check(lat == 2, $sformatf("hit latency %0d", lat));
  endtask

  task automatic do_store(input logic [ADDR_W-1:0] a, input logic txn);
    logic [WORD_W-1:0] rd, d, old, nw; logic ovf, missed; int lat;
    logic [WORD_BYTES-1:0] be;
    d  = {$urandom, $urandom};
    be = ($urandom_range(0, 3) == 0) ? 8'($urandom) : 8'hff;
    cpu(REQ_STORE, a, d, be, 0, rd, ovf, lat, missed);
    if (!missed) check(lat == 2, $sformatf("store hit latency %0d", lat));
    old = view_rd(a);
    for (int b = 0; b < 8; b++) nw[b*8 +: 8] = be[b] ? d[b*8 +: 8] : old[b*8 +: 8];
    if (txn) spec[a] = nw; else gold[a] = nw;
  endtask

  task automatic do_fwd(input logic [ADDR_W-1:0] a);
    logic [ADDR_W-1:0] la;
    la = {a[ADDR_W-1:6], 6'b0};
    @(negedge clk);
    fwd_valid = 1; fwd_addr = la;
    do @(posedge clk); while (!fwd_ready);
    #1 fwd_valid = 0;
    do @(posedge clk); while (!fwd_rsp_valid);
    check(!(fwd_rsp_hit && fwd_rsp_nack), "forward hit and nack together");
    if (fwd_rsp_nack) check(!lazy && in_tx, "nack outside eager transaction");
    if (fwd_rsp_hit) begin
      n_fwd_hit++;
      for (int k = 0; k < 8; k++)
        check(fwd_rsp_data[k*64 +: 64] == gold_rd(la + ADDR_W'(k * 8)),
              $sformatf("forward %h word %0d", la, k));
    end
  endtask

  task automatic set_mode(input logic m);
    logic [WORD_W-1:0] rd; logic ovf, missed; int lat;
    cpu(REQ_SET_MODE, '0, '0, '0, m, rd, ovf, lat, missed);
    check(tmm == m, "mode after SET_MODE");
  endtask

  task automatic tx_begin();
    logic [WORD_W-1:0] rd; logic ovf, missed; int lat;
    log_a.delete(); log_d.delete();
    cpu(REQ_TX_BEGIN, '0, '0, '0, 0, rd, ovf, lat, missed);
    check(in_tx, "in_tx after begin");
  endtask

  task automatic tx_commit();
    logic [WORD_W-1:0] rd; logic ovf, missed; int lat;
    cpu(REQ_TX_COMMIT, '0, '0, '0, 0, rd, ovf, lat, missed);
    foreach (spec[wa]) gold[wa] = spec[wa];
    spec.delete();
    foreach (l2_t[la]) l2_c[la] = l2_t[la];
    l2_t.delete();
    n_commit++;
    check(!in_tx, "in_tx after commit");
  endtask

  task automatic tx_abort();
    logic [WORD_W-1:0] rd; logic ovf, missed; int lat;
    cpu(REQ_TX_ABORT, '0, '0, '0, 0, rd, ovf, lat, missed);
    spec.delete();
    l2_t.delete();
    n_abort++;
    check(ovf == (log_a.size() != 0), "overflow bit reports the log");
    if (ovf) begin
      n_ovf_abort++;
      // software handler: unroll the log, newest entry first
      for (int i = log_a.size() - 1; i >= 0; i--) l2_c[log_a[i]] = log_d[i];
    end
    check(!in_tx, "in_tx after abort");
  endtask

  // ------------------------------------------------------------ sequence
  task automatic run_policy(input logic lz, input int ntx);
    lazy = lz;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    gold.delete(); spec.delete(); l2_c.delete(); l2_t.delete();
    check(!tmm, "reset into general purpose mode");
    // general purpose mode
    for (int n = 0; n < 150; n++) begin
      logic [ADDR_W-1:0] a = pool_addr();
      if ($urandom_range(0, 1)) do_store(a, 0); else do_load(a);
      if (n % 20 == 0) do_fwd(pool_addr());
    end
    set_mode(1);
    for (int i = 0; i < 40; i++) do_load(pool_addr());
    // transactions
    for (int t = 0; t < ntx; t++) begin
      int len = $urandom_range(3, 14);
      tx_begin();
      for (int n = 0; n < len; n++) begin
        logic [ADDR_W-1:0] a = pool_addr();
        if ($urandom_range(0, 1)) do_store(a, 1); else do_load(a);
        if ($urandom_range(0, 4) == 0) do_fwd(pool_addr());
      end
      if ($urandom_range(0, 1)) tx_commit(); else tx_abort();
      for (int n = 0; n < 3; n++) begin
        logic [ADDR_W-1:0] a = pool_addr();
        if ($urandom_range(0, 2) == 0) do_store(a, 0); else do_load(a);
      end
      do_fwd(pool_addr());
    end
    set_mode(0);
    for (int s = 0; s < 3; s++)
      for (int t = 0; t < 10; t++)
        do_load(48'h0040_0000 + ADDR_W'(t << 13) + ADDR_W'(s << 6) + ADDR_W'($urandom_range(0, 7) << 3));
  endtask

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    req_valid = 0; req_op = REQ_LOAD; req_addr = '0; req_wdata = '0; req_be = '0; req_tmm = 0;
    fwd_valid = 0; fwd_addr = '0; lazy = 0; fill_pend = 0; fill_wait = 0; fill_addr = '0;
    log_base = 48'h7000_0000; log_limit = 48'h7010_0000;
    mem_req_ready = 1; log_ready = 1;
    run_policy(0, 60);
    need(n_storeall, "StoreAll at begin (eager)");
    need(n_vscclr,   "VSC flash clear at commit (eager)");
    need(n_log,      "logging of an evicted shadow copy (eager)");
    need(n_ovf_abort,"abort with overflow and log unroll (eager)");
    need(n_nack,     "NACK of a forwarded request (eager)");
    run_policy(1, 60);
    need(n_store,    "Store of the write-set at commit (lazy)");
    need(n_shwb,     "write-back of a committed shadow copy on eviction (lazy)");
    need(n_lread,    "forwarded request served by LRead (lazy)");
    need(n_hit,      "hit");
    need(n_miss,     "miss");
    need(n_ulwrite,  "ULWrite fill");
    need(n_txfill,   "refetch of a transactionally modified line (no shadow copy)");
    need(n_restore,  "Restore at abort");
    need(n_inval,    "invalidation of a write-set line without shadow copy");
    need(n_spill,    "spill of a transactional value");
    need(n_evwb,     "dirty write-back on eviction");
    need(n_flwb,     "write-back during mode-switch flush");
    need(n_mode,     "mode switch");
    need(n_fwd_hit,  "forwarded request answered with data");
    $display("events: hit=%0d miss=%0d storeall=%0d ulwrite=%0d uwrite_fill=%0d store=%0d restore=%0d",
             n_hit, n_miss, n_storeall, n_ulwrite, n_uwfill, n_store, n_restore);
    $display("        abort_inval=%0d vsc_clear=%0d log=%0d shadow_wb=%0d spill=%0d evict_wb=%0d",
             n_inval, n_vscclr, n_log, n_shwb, n_spill, n_evwb);
    $display("        fwd_lread=%0d fwd_nack=%0d fwd_hit=%0d flush_wb=%0d mode=%0d txfill=%0d commits=%0d aborts=%0d ovf_aborts=%0d",
             n_lread, n_nack, n_fwd_hit, n_flwb, n_mode, n_txfill, n_commit, n_abort, n_ovf_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
