// rdc_l1d: reconfigurable L1 data cache (RDC) with transactional version
// management.
//
// The cache has two execution modes selected by the TMM bit. With TMM=0 it is
// a 64KB, 4-way, 64-byte-line general purpose data cache whose upper and lower
// cells hold different lines (consecutive sets of the same way). With TMM=1 it
// is a 32KB, 4-way cache in which every line has two versions: the new value
// in the upper cells and a shadow copy of the last committed value in the
// lower cells, qualified by a per-line Valid Shadow Copy (VSC) bit.
//
// The controller implements the transactional operations on top of that
// array, for an eager (in-place, undo-log) or a lazy (buffered, write-back at
// commit by address) HTM, chosen by the static `lazy` input:
//   begin  : eager - StoreAll copies every upper line to its lower cells in
//            one cycle and sets all VSC bits; lazy - nothing to do, the shadow
//            copies are kept current at commit.
//   fill   : a line fetched on a miss is written with ULWrite (both cells, VSC
//            set) unless the next level reports it transactionally modified,
//            in which case UWrite is used and VSC stays clear. In eager mode
//            shadow copies are created this way only inside a transaction.
//   store  : transactional stores write the upper cells (UWrite) and mark the
//            line in the write-set (txw). Non-transactional stores to a line
//            with a valid shadow copy write both cells to keep them equal.
//   evict  : eager - a write-set line with VSC set meets the logging
//            condition; its shadow copy goes through rdc_evict_buf to the log
//            port and the overflow bit is set; the new value is sent to the
//            next level as transactional. lazy - the committed value in the
//            shadow copy is written back first (if dirty), then the
//            transactional value is spilled.
//   commit : eager - flash clear of all VSC and write-set bits (1 cycle);
//            lazy - a walk over the 128 rows Stores every write-set line into
//            its shadow copy, so the next transaction needs no write-back.
//   abort  : a walk over the 128 rows Restores every write-set line with VSC
//            set and drops write-set lines without one; the response carries
//            the overflow bit, telling software to unroll the log.
//   forward: a coherence request from another core is answered from the
//            shadow copy (LRead) when VSC is set in lazy mode; in eager mode a
//            request for a write-set line is refused (NACK).
//   mode   : SET_MODE writes back and invalidates every line, then sets TMM.
//
// Interfaces (valid/ready handshakes, a transfer happens at a clock edge where
// both are high):
//   CPU    : req_* (one request at a time) and a one-cycle rsp_valid pulse.
//   next level: mem_req_* (read, write, transactional write) and mem_rsp_*.
//   log    : log_valid/log_ready with physical line address and old data.
//   forward: fwd_valid/fwd_ready and a one-cycle fwd_rsp_valid pulse.
// Timing: a load or store hit is accepted at one edge and its response is
// valid in the second cycle after that (2-cycle hit). StoreAll, flash clear
// and each Store/Restore take one cycle; commit (lazy) and abort walks take
// 128 cycles plus two. The row walks, the word width, the handshakes, reset
// into general purpose mode and the NACK in eager mode are this design's own
// choices; the modes, the cell operations and the VSC, logging, commit and
// abort rules follow the RDC-HTM scheme.
module rdc_l1d
  import rdc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration
  input  logic                  lazy,          // 0: eager RDC-HTM, 1: lazy RDC-HTM
  input  logic [ADDR_W-1:0]     log_base,      // log region, never logged
  input  logic [ADDR_W-1:0]     log_limit,
  // CPU side
  input  logic                  req_valid,
  output logic                  req_ready,
  input  req_op_e               req_op,
  input  logic [ADDR_W-1:0]     req_addr,
  input  logic [WORD_W-1:0]     req_wdata,
  input  logic [WORD_BYTES-1:0] req_be,
  input  logic                  req_tmm,       // new mode for REQ_SET_MODE
  output logic                  rsp_valid,
  output logic [WORD_W-1:0]     rsp_rdata,
  output logic                  rsp_overflow,  // abort: the log must be unrolled
  output logic                  tmm,
  output logic                  in_tx,
  // next level
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output mem_cmd_e              mem_req_cmd,
  output logic [ADDR_W-1:0]     mem_req_addr,
  output logic [LINE_W-1:0]     mem_req_data,
  input  logic                  mem_rsp_valid,
  input  logic [LINE_W-1:0]     mem_rsp_data,
  input  logic                  mem_rsp_txmod, // line is transactionally modified
  // undo log (eager)
  output logic                  log_valid,
  input  logic                  log_ready,
  output logic [ADDR_W-1:0]     log_addr,
  output logic [LINE_W-1:0]     log_data,
  // forwarded coherence requests
  input  logic                  fwd_valid,
  output logic                  fwd_ready,
  input  logic [ADDR_W-1:0]     fwd_addr,
  output logic                  fwd_rsp_valid,
  output logic                  fwd_rsp_hit,
  output logic                  fwd_rsp_nack,
  output logic [LINE_W-1:0]     fwd_rsp_data,
  // mechanism events
  output rdc_events_t           ev
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_RESP, S_BEGIN, S_COMMIT, S_WALK, S_WALK_END,
    S_EV_RD_U, S_EV_RD_L, S_EV_WB, S_FILL_REQ, S_FILL_WAIT,
    S_FLUSH, S_FLUSH_WB, S_FWD, S_FWD_RSP
  } state_e;

  state_e                state;
  req_op_e               r_op;
  logic [ADDR_W-1:0]     r_addr, f_addr;
  logic [WORD_W-1:0]     r_wdata;
  logic [WORD_BYTES-1:0] r_be;
  logic                  r_tmm;
  logic [1:0]            r_victim;
  tag_entry_t            ev_entry;
  logic [LINE_W-1:0]     wb_line;
  logic [9:0]            cnt;           // walk counter: rows, or {index, way} in flush
  logic [WORD_W-1:0]     rsp_rdata_q;
  logic                  rsp_ovf_q;
  logic                  fwd_hit_q, fwd_nack_q;
  logic [LINE_W-1:0]     fwd_data_q;

  // ---------------------------------------------------------------- arrays
  logic [7:0]        cur_idx;
  logic [TAG_W-1:0]  cur_tag;
  tag_entry_t        t_rd   [WAYS];
  logic [WAYS-1:0]   t_hit;
  logic [WAYS-1:0]   t_we;
  tag_entry_t        t_wentry [WAYS];
  logic              set_vsc_all, clr_vsc_all, clr_txw_all;

  logic [WAYS-1:0]   d_cs;
  cell_op_e          d_op;
  logic              d_we;
  logic [LINE_BYTES-1:0] d_be;
  logic [LINE_W-1:0] d_wdata;
  logic [LINE_W-1:0] d_rdata [WAYS];
  logic [1:0]        mux_sel;
  logic [LINE_W-1:0] line_rd;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    rdc_tag_way u_tag (
      .clk(clk), .rst_n(rst_n), .tmm(tmm), .idx(cur_idx), .cmp_tag(cur_tag),
      .rd_entry(t_rd[w]), .hit(t_hit[w]), .we(t_we[w]), .wentry(t_wentry[w]),
      .set_vsc_all(set_vsc_all), .clr_vsc_all(clr_vsc_all), .clr_txw_all(clr_txw_all)
    );
    rdc_data_way u_data (
      .clk(clk), .tmm(tmm), .cs(d_cs[w]), .idx(cur_idx), .op(d_op),
      .we(d_we), .be(d_be), .wdata(d_wdata), .rdata(d_rdata[w])
    );
  end

  rdc_way_mux u_mux (.din(d_rdata), .sel(mux_sel), .dout(line_rd));

  // hit way
  logic [1:0] hit_way;
  logic       any_hit;
  always_comb begin
    hit_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) if (t_hit[w]) hit_way = w[1:0];
    any_hit = |t_hit;
  end

  // replacement: first invalid way, else pseudo-LRU
  logic [1:0] plru_victim, victim;
  logic       plru_touch;
  logic       have_invalid;
  rdc_plru #(.SETS(TAG_ROWS)) u_plru (
    .clk(clk), .rst_n(rst_n), .idx(tmm ? {1'b0, cur_idx[6:0]} : cur_idx),
    .victim(plru_victim), .touch(plru_touch), .touch_way(hit_way)
  );
  always_comb begin
    victim       = plru_victim;
    have_invalid = 1'b0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!t_rd[w].valid) begin
        victim       = w[1:0];
        have_invalid = 1'b1;
      end
    end
  end

  // shadow-copy eviction buffer
  logic              eb_load, eb_busy, eb_wb_valid, eb_wb_ready, clr_overflow, overflow;
  logic [ADDR_W-1:0] eb_wb_addr, ev_addr;
  logic [LINE_W-1:0] eb_wb_data;
  rdc_evict_buf u_eb (
    .clk(clk), .rst_n(rst_n), .lazy(lazy), .log_base(log_base), .log_limit(log_limit),
    .load(eb_load), .ld_addr(ev_addr), .ld_data(line_rd),
    .ld_txw(ev_entry.txw), .ld_vsc(ev_entry.vsc), .ld_dirty(ev_entry.dirty),
    .busy(eb_busy),
    .log_valid(log_valid), .log_ready(log_ready), .log_addr(log_addr), .log_data(log_data),
    .wb_valid(eb_wb_valid), .wb_ready(eb_wb_ready), .wb_addr(eb_wb_addr), .wb_data(eb_wb_data),
    .clr_overflow(clr_overflow), .overflow(overflow)
  );

  assign ev_addr = {ev_entry.tag, cur_idx[6:0], {OFFSET_W{1'b0}}};

  // ---------------------------------------------------------------- helpers
  logic [2:0] r_word;
  assign r_word = r_addr[5:3];

  function automatic tag_entry_t fill_entry(input logic [TAG_W-1:0] tg, input logic shadow,
                                            input logic txw);
    tag_entry_t e;
    e.valid = 1'b1;
    e.dirty = 1'b0;
    e.txw   = txw;
    e.vsc   = shadow;
    e.tag   = tg;
    return e;
  endfunction

  logic fill_shadow;
  assign fill_shadow = tmm && (lazy || in_tx) && !mem_rsp_txmod;

  logic ev_needs_lower, ev_needs_upper;
  assign ev_needs_lower = tmm && ev_entry.txw && ev_entry.vsc;
  assign ev_needs_upper = ev_entry.dirty || (tmm && ev_entry.txw);

  logic last_walk_row, last_flush;
  assign last_walk_row = (cnt[6:0] == 7'd127);
  assign last_flush    = (cnt == 10'd1023);

  // ---------------------------------------------------------------- datapath control
  always_comb begin
    req_ready     = (state == S_IDLE) && !fwd_valid;
    fwd_ready     = (state == S_IDLE);
    rsp_valid     = (state == S_RESP);
    rsp_rdata     = rsp_rdata_q;
    rsp_overflow  = rsp_ovf_q;
    fwd_rsp_valid = (state == S_FWD_RSP);
    fwd_rsp_hit   = fwd_hit_q;
    fwd_rsp_nack  = fwd_nack_q;
    fwd_rsp_data  = fwd_data_q;

    cur_idx = r_addr[13:6];
    cur_tag = r_addr[ADDR_W-1:13];
    case (state)
      S_FWD:                cur_idx = f_addr[13:6];
      S_WALK:               cur_idx = {1'b0, cnt[6:0]};
      S_FLUSH, S_FLUSH_WB:  cur_idx = cnt[9:2];
      default: ;
    endcase
    if (state == S_FWD) cur_tag = f_addr[ADDR_W-1:13];

    t_we        = '0;
    for (int unsigned w = 0; w < WAYS; w++) t_wentry[w] = t_rd[w];
    set_vsc_all = 1'b0;
    clr_vsc_all = 1'b0;
    clr_txw_all = 1'b0;
    d_cs        = '0;
    d_op        = OP_UPPER;
    d_we        = 1'b0;
    d_be        = '1;
    d_wdata     = mem_rsp_data;
    mux_sel     = hit_way;
    plru_touch  = 1'b0;
    eb_load     = 1'b0;
    eb_wb_ready = 1'b0;
    clr_overflow= 1'b0;
    mem_req_valid = 1'b0;
    mem_req_cmd   = MEM_READ;
    mem_req_addr  = {r_addr[ADDR_W-1:OFFSET_W], {OFFSET_W{1'b0}}};
    mem_req_data  = wb_line;
    ev            = '0;
    ev.log        = log_valid && log_ready;

    case (state)
      S_LOOKUP: begin
        if (any_hit) begin
          ev.hit     = 1'b1;
          plru_touch = 1'b1;
          d_cs[hit_way] = 1'b1;
          if (r_op == REQ_STORE) begin
            d_we    = 1'b1;
            d_be    = '0;
            d_be[r_word*WORD_BYTES +: WORD_BYTES] = r_be;
            d_wdata = {(LINE_W/WORD_W){r_wdata}};
            // keep the shadow copy equal to the line outside transactions
            d_op    = (tmm && !in_tx && t_rd[hit_way].vsc) ? OP_ULWRITE : OP_UPPER;
            t_we[hit_way]           = 1'b1;
            t_wentry[hit_way].dirty = 1'b1;
            if (tmm && in_tx) t_wentry[hit_way].txw = 1'b1;
          end
        end else begin
          ev.miss = 1'b1;
        end
      end

      S_BEGIN: begin
        clr_overflow = 1'b1;
        if (tmm && !lazy) begin
          d_cs        = '1;
          d_op        = OP_STOREALL;
          set_vsc_all = 1'b1;
          ev.storeall = 1'b1;
        end
      end

      S_COMMIT: begin
        clr_vsc_all  = 1'b1;
        clr_txw_all  = 1'b1;
        ev.vsc_clear = 1'b1;
      end

      S_WALK: begin
        for (int unsigned w = 0; w < WAYS; w++) begin
          if (t_rd[w].valid && t_rd[w].txw) begin
            t_we[w] = 1'b1;
            if (r_op == REQ_TX_COMMIT) begin
              d_cs[w] = 1'b1;
              t_wentry[w].txw   = 1'b0;
              t_wentry[w].vsc   = 1'b1;
              t_wentry[w].dirty = 1'b1;
              ev.store = 1'b1;
            end else if (t_rd[w].vsc) begin
              d_cs[w] = 1'b1;
              t_wentry[w].txw = 1'b0;
              ev.restore = 1'b1;
            end else begin
              t_wentry[w] = '0;
              ev.abort_inval = 1'b1;
            end
          end
        end
        d_op = (r_op == REQ_TX_COMMIT) ? OP_STORE : OP_RESTORE;
      end

      S_EV_RD_U: begin
        mux_sel        = r_victim;
        d_cs[r_victim] = 1'b1;
        d_op           = OP_UPPER;
      end

      S_EV_RD_L: begin
        mux_sel        = r_victim;
        d_cs[r_victim] = 1'b1;
        d_op           = OP_LOWER;
        eb_load        = !eb_busy;
      end

      S_EV_WB: begin
        if (eb_wb_valid) begin
          mem_req_valid = 1'b1;
          mem_req_cmd   = MEM_WRITE;
          mem_req_addr  = eb_wb_addr;
          mem_req_data  = eb_wb_data;
          eb_wb_ready   = mem_req_ready;
          ev.shadow_wb  = mem_req_ready;
        end else begin
          if (ev_needs_upper) begin
            mem_req_valid = 1'b1;
            mem_req_cmd   = (tmm && ev_entry.txw) ? MEM_WRITE_TX : MEM_WRITE;
            mem_req_addr  = ev_addr;
            ev.spill_tx   = mem_req_ready && tmm && ev_entry.txw;
            ev.evict_wb   = mem_req_ready && !(tmm && ev_entry.txw);
          end
          if (!ev_needs_upper || mem_req_ready) begin
            t_we[r_victim]     = 1'b1;
            t_wentry[r_victim] = '0;
          end
        end
      end

      S_FILL_REQ: begin
        mem_req_valid = 1'b1;
        mem_req_cmd   = MEM_READ;
      end

      S_FILL_WAIT: begin
        if (mem_rsp_valid) begin
          d_cs[r_victim] = 1'b1;
          d_we           = 1'b1;
          d_op           = fill_shadow ? OP_ULWRITE : OP_UPPER;
          t_we[r_victim] = 1'b1;
          t_wentry[r_victim] = fill_entry(r_addr[ADDR_W-1:13], fill_shadow,
                                          tmm && in_tx && mem_rsp_txmod);
          ev.ulwrite     = fill_shadow;
          ev.uwrite_fill = !fill_shadow;
        end
      end

      S_FLUSH: begin
        mux_sel          = cnt[1:0];
        d_cs[cnt[1:0]]   = 1'b1;
        d_op             = OP_UPPER;
        if (t_rd[cnt[1:0]].valid && !t_rd[cnt[1:0]].dirty) begin
          t_we[cnt[1:0]]     = 1'b1;
          t_wentry[cnt[1:0]] = '0;
        end
        if (last_flush && !(t_rd[cnt[1:0]].valid && t_rd[cnt[1:0]].dirty)) begin
          clr_vsc_all    = 1'b1;
          clr_txw_all    = 1'b1;
          ev.mode_switch = (r_tmm != tmm);
        end
      end

      S_FLUSH_WB: begin
        mem_req_valid = 1'b1;
        mem_req_cmd   = MEM_WRITE;
        mem_req_addr  = {t_rd[cnt[1:0]].tag, cnt[8:2], {OFFSET_W{1'b0}}};
        if (mem_req_ready) begin
          t_we[cnt[1:0]]     = 1'b1;
          t_wentry[cnt[1:0]] = '0;
          ev.flush_wb        = 1'b1;
        end
      end

      S_FWD: begin
        mux_sel = hit_way;
        if (any_hit) begin
          d_cs[hit_way] = 1'b1;
          d_op = (tmm && lazy && t_rd[hit_way].vsc) ? OP_LOWER : OP_UPPER;
          ev.fwd_lread = tmm && lazy && t_rd[hit_way].vsc;
          ev.fwd_nack  = tmm && !lazy && t_rd[hit_way].txw;
        end
      end

      default: ;
    endcase
  end

  // ---------------------------------------------------------------- state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      r_op        <= REQ_LOAD;
      r_addr      <= '0;
      f_addr      <= '0;
      r_wdata     <= '0;
      r_be        <= '0;
      r_tmm       <= 1'b0;
      r_victim    <= '0;
      ev_entry    <= '0;
      wb_line     <= '0;
      cnt         <= '0;
      rsp_rdata_q <= '0;
      rsp_ovf_q   <= 1'b0;
      fwd_hit_q   <= 1'b0;
      fwd_nack_q  <= 1'b0;
      fwd_data_q  <= '0;
      tmm         <= 1'b0;
      in_tx       <= 1'b0;
    end else begin
      case (state)
        S_IDLE: begin
          if (fwd_valid) begin
            f_addr <= fwd_addr;
            state  <= S_FWD;
          end else if (req_valid) begin
            r_op      <= req_op;
            r_addr    <= req_addr;
            r_wdata   <= req_wdata;
            r_be      <= req_be;
            r_tmm     <= req_tmm;
            rsp_ovf_q <= 1'b0;
            cnt       <= '0;
            case (req_op)
              REQ_LOAD, REQ_STORE: state <= S_LOOKUP;
              REQ_TX_BEGIN:        state <= S_BEGIN;
              REQ_TX_COMMIT:       state <= !tmm ? S_RESP : (lazy ? S_WALK : S_COMMIT);
              REQ_TX_ABORT:        state <= !tmm ? S_RESP : S_WALK;
              REQ_SET_MODE:        state <= S_FLUSH;
              default:             state <= S_RESP;
            endcase
          end
        end

        S_LOOKUP: begin
          if (any_hit) begin
            rsp_rdata_q <= line_rd[r_word*WORD_W +: WORD_W];
            state       <= S_RESP;
          end else begin
            r_victim <= victim;
            ev_entry <= t_rd[victim];
            state    <= have_invalid ? S_FILL_REQ : S_EV_RD_U;
          end
        end

        S_RESP: state <= S_IDLE;

        S_BEGIN: begin
          if (tmm) in_tx <= 1'b1;
          state <= S_RESP;
        end

        S_COMMIT: begin
          in_tx <= 1'b0;
          state <= S_RESP;
        end

        S_WALK: begin
          cnt <= cnt + 10'd1;
          if (last_walk_row) state <= S_WALK_END;
        end

        S_WALK_END: begin
          // the log must be complete before software looks at the overflow bit
          if (!eb_busy) begin
            rsp_ovf_q <= (r_op == REQ_TX_ABORT) && overflow;
            in_tx     <= 1'b0;
            state     <= S_RESP;
          end
        end

        S_EV_RD_U: begin
          wb_line <= line_rd;
          state   <= ev_needs_lower ? S_EV_RD_L : S_EV_WB;
        end

        S_EV_RD_L: if (!eb_busy) state <= S_EV_WB;

        S_EV_WB: begin
          if (!eb_wb_valid && (!ev_needs_upper || mem_req_ready)) state <= S_FILL_REQ;
        end

        S_FILL_REQ: if (mem_req_ready) state <= S_FILL_WAIT;

        S_FILL_WAIT: if (mem_rsp_valid) state <= S_LOOKUP;

        S_FLUSH: begin
          if (t_rd[cnt[1:0]].valid && t_rd[cnt[1:0]].dirty) begin
            wb_line <= line_rd;
            state   <= S_FLUSH_WB;
          end else if (last_flush) begin
            tmm   <= r_tmm;
            in_tx <= 1'b0;
            state <= S_RESP;
          end else begin
            cnt <= cnt + 10'd1;
          end
        end

        S_FLUSH_WB: if (mem_req_ready) state <= S_FLUSH;

        S_FWD: begin
          fwd_hit_q  <= any_hit && !(tmm && lazy && t_rd[hit_way].txw && !t_rd[hit_way].vsc)
                        && !(tmm && !lazy && t_rd[hit_way].txw);
          fwd_nack_q <= any_hit && tmm && !lazy && t_rd[hit_way].txw;
          fwd_data_q <= line_rd;
          state      <= S_FWD_RSP;
        end

        S_FWD_RSP: state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  // A request to the next level is held until it is taken.
  a_mem_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid);
  // One outstanding CPU request: no new request is taken while responding.
  a_rsp_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |-> !req_ready);

endmodule
