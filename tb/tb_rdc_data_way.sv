// tb_rdc_data_way: one way of the data array in both modes against a
// reference of 128 rows x (upper, lower).
//   general purpose: 256 distinct lines written and read back; set 2r must land
//     in the upper cells and set 2r+1 in the lower cells of row r.
//   TM: random UWrite/ULWrite/URead/LRead/Store/Restore on single lines plus
//     StoreAll, which must copy every row in one cycle.
module tb_rdc_data_way;
  import rdc_pkg::*;
  logic                  clk = 0;
  logic                  tmm, cs, we;
  logic [7:0]            idx;
  cell_op_e              op;
  logic [LINE_BYTES-1:0] be;
  logic [LINE_W-1:0]     wdata, rdata;
  logic [LINE_W-1:0]     m_up [128], m_lo [128];
  int checks = 0, failures = 0;

  rdc_data_way dut (.*);

  always #5 clk = ~clk;

  function automatic logic [LINE_W-1:0] rnd();
    logic [LINE_W-1:0] v;
    for (int k = 0; k < LINE_W / 32; k++) v[k*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic do_op(input logic t, input logic [7:0] i, input cell_op_e o, input logic w,
                       input logic [LINE_W-1:0] d);
    @(negedge clk);
    tmm = t; cs = 1; idx = i; op = o; we = w; wdata = d; be = '1;
    @(posedge clk); #1;
    cs = 0; we = 0;
  endtask

  task automatic rd_check(input logic t, input logic [7:0] i, input cell_op_e o,
                          input logic [LINE_W-1:0] exp, input string what);
    @(negedge clk);
    tmm = t; cs = 1; idx = i; op = o; we = 0;
    #1;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s idx=%0d", what, i);
    end
    cs = 0;
  endtask

  initial begin
    cs = 0; we = 0; tmm = 0; idx = 0; op = OP_UPPER; be = '1; wdata = '0;
    // general purpose mode: 256 lines
    for (int i = 0; i < 256; i++) begin
      logic [LINE_W-1:0] d = rnd();
      if (i % 2 == 0) m_up[i / 2] = d; else m_lo[i / 2] = d;
      do_op(0, i[7:0], OP_UPPER, 1, d);
    end
    for (int i = 0; i < 256; i++)
      rd_check(0, i[7:0], OP_UPPER, (i % 2 == 0) ? m_up[i / 2] : m_lo[i / 2], "GP read");
    // the same rows seen in TM mode: upper/lower of row r
    for (int r = 0; r < 128; r += 17) begin
      rd_check(1, r[7:0], OP_UPPER, m_up[r], "TM URead of GP data");
      rd_check(1, r[7:0], OP_LOWER, m_lo[r], "TM LRead of GP data");
    end
    // TM mode random operations
    for (int n = 0; n < 300; n++) begin
      int r = $urandom_range(0, 127);
      logic [7:0] i = {1'($urandom_range(0, 1)), r[6:0]};  // A13 is ignored in TM mode
      logic [LINE_W-1:0] d = rnd();
      case ($urandom_range(0, 5))
        0: begin do_op(1, i, OP_UPPER,   1, d); m_up[r] = d; end
        1: begin do_op(1, i, OP_ULWRITE, 1, d); m_up[r] = d; m_lo[r] = d; end
        2: begin do_op(1, i, OP_STORE,   0, d); m_lo[r] = m_up[r]; end
        3: begin do_op(1, i, OP_RESTORE, 0, d); m_up[r] = m_lo[r]; end
        4: begin do_op(1, i, OP_LOWER,   1, d); m_lo[r] = d; end
        default: begin
          do_op(1, i, OP_STOREALL, 0, d);
          for (int k = 0; k < 128; k++) m_lo[k] = m_up[k];
        end
      endcase
      rd_check(1, i, OP_UPPER, m_up[r], "TM URead");
      rd_check(1, i, OP_LOWER, m_lo[r], "TM LRead");
    end
    // StoreAll must reach every row
    for (int r = 0; r < 128; r++) begin
      logic [LINE_W-1:0] d = rnd();
      do_op(1, r[7:0], OP_UPPER, 1, d); m_up[r] = d;
    end
    do_op(1, 8'd5, OP_STOREALL, 0, '0);
    for (int r = 0; r < 128; r++) rd_check(1, r[7:0], OP_LOWER, m_up[r], "StoreAll");
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
