// tb_rdc_l1d_reuse: the two effects the shadow copies are for, measured on
// the full-size cache with a working set that fits in the 32KB TM mode.
//
// Lazy policy, repeated transactions: a series of transactions writes the same
// K lines again and again. After the first fill, no transaction may cause any
// traffic to the next level: the committed values stay in the shadow copies
// and need no write-back, and every access hits.
// Lazy and eager policy, abort and re-execute: a transaction writes K lines
// and aborts. Restore recovers the old values inside the L1, so the
// re-executed transaction must hit on every line (no refetch), no log entry is
// written (eager, nothing overflowed), and the loaded values must be the
// pre-transactional ones.
module tb_rdc_l1d_reuse;
  import rdc_pkg::*;

  localparam int K = 64;    // lines in the write-set (16 sets x 4 ways)
  localparam int REPS = 8;  // repeated transactions

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
  int n_rd = 0, n_wr = 0, n_log = 0, n_miss = 0, n_restore = 0, n_store = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // next level: every line reads as a function of its address
  function automatic logic [WORD_W-1:0] init_word(input logic [ADDR_W-1:0] wa);
    return {16'hc0de, wa[47:0]};
  endfunction

  logic              fill_pend;
  logic [ADDR_W-1:0] fill_addr;
  always @(posedge clk) if (rst_n) begin
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_cmd == MEM_READ) begin
        n_rd++;
        fill_pend <= 1'b1;
        fill_addr <= mem_req_addr;
      end else begin
        n_wr++;
      end
    end
    if (fill_pend) fill_pend <= 1'b0;
    if (log_valid && log_ready) n_log++;
    begin
      n_miss    += int'(ev.miss);
      n_restore += int'(ev.restore);
      n_store   += int'(ev.store);
    end
  end

  always_comb begin
    mem_rsp_valid = fill_pend;
    mem_rsp_txmod = 1'b0;
    for (int k = 0; k < 8; k++) mem_rsp_data[k*64 +: 64] = init_word(fill_addr + ADDR_W'(k * 8));
  end

  task automatic cpu(input req_op_e op, input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] d,
                     input logic newtmm, output logic [WORD_W-1:0] rd);
    @(negedge clk);
    req_valid = 1; req_op = op; req_addr = a; req_wdata = d; req_be = '1; req_tmm = newtmm;
    do @(posedge clk); while (!req_ready);
    #1 req_valid = 0;
    do @(posedge clk); while (!rsp_valid);
    rd = rsp_rdata;
  endtask

  function automatic logic [ADDR_W-1:0] line_addr(input int i);
    // 16 TM sets, 4 lines each
    return 48'h0010_0000 + ADDR_W'((i / 16) << 13) + ADDR_W'((i % 16) << 6);
  endfunction

  task automatic run(input logic lz);
    logic [WORD_W-1:0] rd;
    int rd0, wr0, miss0, log0, rst0, st0;
    lazy = lz;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cpu(REQ_SET_MODE, '0, '0, 1, rd);
    // warm the cache
    for (int i = 0; i < K; i++) cpu(REQ_LOAD, line_addr(i), '0, 0, rd);
    // repeated transactions over the same write-set
    rd0 = n_rd; wr0 = n_wr; miss0 = n_miss; st0 = n_store;
    for (int r = 0; r < REPS; r++) begin
      cpu(REQ_TX_BEGIN, '0, '0, 0, rd);
      for (int i = 0; i < K; i++) cpu(REQ_STORE, line_addr(i), 64'(r * 1000 + i), 0, rd);
      cpu(REQ_TX_COMMIT, '0, '0, 0, rd);
    end
    check(n_miss == miss0, $sformatf("repeated transactions missed %0d times", n_miss - miss0));
    check(n_rd == rd0 && n_wr == wr0,
          $sformatf("repeated transactions caused %0d reads, %0d writes", n_rd - rd0, n_wr - wr0));
    // the 4 ways are walked in parallel: K lines occupy K/4 rows
    if (lz) check(n_store - st0 == (K / 4) * REPS, $sformatf("Store cycles at commit %0d", n_store - st0));
    for (int i = 0; i < K; i++) begin
      cpu(REQ_LOAD, line_addr(i), '0, 0, rd);
      check(rd == 64'((REPS - 1) * 1000 + i), "committed value after repeated transactions");
    end
    // abort and re-execute
    rd0 = n_rd; miss0 = n_miss; log0 = n_log; rst0 = n_restore;
    cpu(REQ_TX_BEGIN, '0, '0, 0, rd);
    for (int i = 0; i < K; i++) cpu(REQ_STORE, line_addr(i), 64'hdead_0000 + 64'(i), 0, rd);
    cpu(REQ_TX_ABORT, '0, '0, 0, rd);
    check(!rsp_overflow, "no overflow for a write-set that fits");
    check(n_restore - rst0 == K / 4, $sformatf("Restore cycles %0d, expected %0d", n_restore - rst0, K / 4));
    cpu(REQ_TX_BEGIN, '0, '0, 0, rd);
    for (int i = 0; i < K; i++) begin
      cpu(REQ_LOAD, line_addr(i), '0, 0, rd);
      check(rd == 64'((REPS - 1) * 1000 + i), "pre-transactional value after abort");
    end
    cpu(REQ_TX_COMMIT, '0, '0, 0, rd);
    check(n_miss == miss0 && n_rd == rd0, "re-executed transaction refetched lines");
    check(n_log == log0, "log written without overflow");
    $display("%s: reads=%0d writes=%0d misses=%0d restores=%0d stores=%0d log=%0d",
             lz ? "lazy" : "eager", n_rd, n_wr, n_miss, n_restore, n_store, n_log);
  endtask

  initial begin
    req_valid = 0; req_op = REQ_LOAD; req_addr = '0; req_wdata = '0; req_be = '0; req_tmm = 0;
    fwd_valid = 0; fwd_addr = '0; fill_pend = 0; fill_addr = '0;
    log_base = 48'h7000_0000; log_limit = 48'h7010_0000;
    mem_req_ready = 1; log_ready = 1; lazy = 0;
    run(1);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
