// rdc_evict_buf: buffer for the shadow copy of an evicted line.
//
// When the controller replaces a line in TM mode it reads the line's lower
// cells (LRead) into this one-entry buffer together with the line address and
// state. The buffer then decides what the shadow copy is for:
//   eager policy: the logging condition is an eviction of a line that is in
//     the write-set (txw) and has a valid shadow copy (vsc). Such a shadow copy
//     is sent out on the log port as (physical line address, old data) and
//     the overflow bit is set. Lines inside the log region [log_base,
//     log_limit) are never logged, which rules out recursive logging.
//   lazy policy: a write-set line whose shadow copy holds a committed value
//     not yet written back (vsc and dirty) must first have that committed
//     value written to the non-transactional level; the buffer offers it on
//     the write-back port.
// Otherwise the shadow copy is discarded at once. `busy` is high while an
// entry waits for its port; `load` must only be given when `busy` is low.
// Both output ports use valid/ready: the entry leaves at the edge where both
// are high. The overflow bit stays set until `clr_overflow` (transaction
// begin). A one-entry buffer and the address-range filter are this design's
// choices.
module rdc_evict_buf
  import rdc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lazy,
  input  logic [ADDR_W-1:0] log_base,
  input  logic [ADDR_W-1:0] log_limit,
  // load from the replacement path
  input  logic              load,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [LINE_W-1:0] ld_data,
  input  logic              ld_txw,
  input  logic              ld_vsc,
  input  logic              ld_dirty,
  output logic              busy,
  // log port (eager)
  output logic              log_valid,
  input  logic              log_ready,
  output logic [ADDR_W-1:0] log_addr,
  output logic [LINE_W-1:0] log_data,
  // shadow write-back port (lazy)
  output logic              wb_valid,
  input  logic              wb_ready,
  output logic [ADDR_W-1:0] wb_addr,
  output logic [LINE_W-1:0] wb_data,
  // overflow bit checked by the abort path
  input  logic              clr_overflow,
  output logic              overflow
);

  logic              full, is_log;
  logic [ADDR_W-1:0] addr_q;
  logic [LINE_W-1:0] data_q;
  logic              in_log_region, log_cond, wb_cond;

  assign in_log_region = (ld_addr >= log_base) && (ld_addr < log_limit);
  assign log_cond      = !lazy && ld_txw && ld_vsc && !in_log_region;
  assign wb_cond       =  lazy && ld_txw && ld_vsc && ld_dirty;

  assign busy      = full;
  assign log_valid = full &&  is_log;
  assign wb_valid  = full && !is_log;
  assign log_addr  = addr_q;
  assign log_data  = data_q;
  assign wb_addr   = addr_q;
  assign wb_data   = data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full     <= 1'b0;
      is_log   <= 1'b0;
      addr_q   <= '0;
      data_q   <= '0;
      overflow <= 1'b0;
    end else begin
      if (clr_overflow) overflow <= 1'b0;
      if (full) begin
        if (log_valid && log_ready) begin
          full     <= 1'b0;
          overflow <= 1'b1;
        end
        if (wb_valid && wb_ready) full <= 1'b0;
      end else if (load && (log_cond || wb_cond)) begin
        full   <= 1'b1;
        is_log <= log_cond;
        addr_q <= ld_addr;
        data_q <= ld_data;
      end
    end
  end

  // A new entry may only be loaded into an empty buffer.
  a_no_load_when_busy: assert property (@(posedge clk) disable iff (!rst_n) !(load && full));

endmodule
