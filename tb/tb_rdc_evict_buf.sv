// tb_rdc_evict_buf: logging condition and shadow write-back decision.
// Eager: only txw & vsc lines outside the log region are logged, the entry
// waits for log_ready, and the overflow bit is set once the log write is
// taken and cleared by clr_overflow. Lazy: txw & vsc & dirty lines are
// offered on the write-back port. Everything else is discarded at once.
module tb_rdc_evict_buf;
  import rdc_pkg::*;
  logic              clk = 0, rst_n = 0;
  logic              lazy;
  logic [ADDR_W-1:0] log_base, log_limit, ld_addr, log_addr, wb_addr;
  logic [LINE_W-1:0] ld_data, log_data, wb_data;
  logic              load, ld_txw, ld_vsc, ld_dirty, busy;
  logic              log_valid, log_ready, wb_valid, wb_ready, clr_overflow, overflow;
  int checks = 0, failures = 0;

  rdc_evict_buf dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    load = 0; log_ready = 0; wb_ready = 0; clr_overflow = 0; lazy = 0;
    log_base = 48'h1000_0000; log_limit = 48'h1001_0000;
    ld_addr = '0; ld_data = '0; ld_txw = 0; ld_vsc = 0; ld_dirty = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic exp_log, exp_wb, in_reg;
      @(negedge clk);
      lazy = 1'($urandom);
      ld_txw = 1'($urandom); ld_vsc = 1'($urandom); ld_dirty = 1'($urandom);
      in_reg = ($urandom_range(0, 3) == 0);
      ld_addr = in_reg ? 48'h1000_0000 + 48'($urandom_range(0, 1023) * 64)
                       : 48'h2000_0000 + 48'($urandom_range(0, 1023) * 64);
      for (int k = 0; k < LINE_W / 32; k++) ld_data[k*32 +: 32] = $urandom;
      exp_log = !lazy && ld_txw && ld_vsc && !in_reg;
      exp_wb  =  lazy && ld_txw && ld_vsc && ld_dirty;
      load = 1;
      @(posedge clk); #1; load = 0;
      check(busy == (exp_log || exp_wb), "decision");
      check(log_valid == exp_log && wb_valid == exp_wb, "port select");
      if (exp_log) begin
        check(log_addr == ld_addr && log_data == ld_data, "log contents");
        repeat ($urandom_range(0, 3)) begin
          @(posedge clk); #1; check(log_valid, "log held until ready");
        end
        @(negedge clk); log_ready = 1; @(posedge clk); #1; log_ready = 0;
        check(!busy && overflow, "log taken, overflow set");
        @(negedge clk); clr_overflow = 1; @(posedge clk); #1; clr_overflow = 0;
        check(!overflow, "overflow cleared");
      end
      if (exp_wb) begin
        check(wb_addr == ld_addr && wb_data == ld_data, "write-back contents");
        @(negedge clk); wb_ready = 1; @(posedge clk); #1; wb_ready = 0;
        check(!busy && !overflow, "write-back taken");
      end
      if (busy) begin  // an entry that should not be there: drain it
        @(negedge clk); log_ready = 1; wb_ready = 1; @(posedge clk); #1;
        log_ready = 0; wb_ready = 0;
        @(negedge clk); clr_overflow = 1; @(posedge clk); #1; clr_overflow = 0;
      end
    end
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
