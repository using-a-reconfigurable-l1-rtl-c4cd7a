// tb_rdc_ecell_row: random sequence of e-cell row operations (UWrite, LWrite,
// ULWrite with byte enables, URead, LRead, Store, Restore, StoreAll) checked
// against a two-value reference model. Every operation completes in one cycle.
module tb_rdc_ecell_row;
  localparam int W = 512;
  logic           clk = 0;
  logic           wl1, wl2, we, store, restore, storeall;
  logic [W/8-1:0] be;
  logic [W-1:0]   wdata, rdata;
  logic [W-1:0]   m_up, m_lo;
  int checks = 0, failures = 0;

  rdc_ecell_row #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int k = 0; k < W / 32; k++) v[k*32 +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [W-1:0] merge(input logic [W-1:0] old, input logic [W-1:0] d,
                                         input logic [W/8-1:0] m);
    logic [W-1:0] r = old;
    for (int i = 0; i < W / 8; i++) if (m[i]) r[i*8 +: 8] = d[i*8 +: 8];
    return r;
  endfunction

  task automatic idle();
    {wl1, wl2, we, store, restore, storeall} = '0;
  endtask

  task automatic check_read();
    idle(); wl1 = 1; #1;
    checks++; if (rdata !== m_up) begin failures++; $display("FAIL URead"); end
    idle(); wl2 = 1; #1;
    checks++; if (rdata !== m_lo) begin failures++; $display("FAIL LRead"); end
    idle(); #1;
    checks++; if (rdata !== '0) begin failures++; $display("FAIL idle row drives bit lines"); end
  endtask

  initial begin
    idle(); be = '1;
    // initialise both cells with ULWrite
    @(negedge clk); wl1 = 1; wl2 = 1; we = 1; wdata = rnd();
    @(posedge clk); #1; m_up = wdata; m_lo = wdata;
    for (int n = 0; n < 400; n++) begin
      int op;
      @(negedge clk);
      check_read();
      op = $urandom_range(0, 5);
      idle();
      wdata = rnd(); be = (n % 3 == 0) ? '1 : {$urandom, $urandom};
      case (op)
        0: begin wl1 = 1; we = 1; m_up = merge(m_up, wdata, be); end
        1: begin wl2 = 1; we = 1; m_lo = merge(m_lo, wdata, be); end
        2: begin wl1 = 1; wl2 = 1; we = 1; m_up = merge(m_up, wdata, be); m_lo = merge(m_lo, wdata, be); end
        3: begin store = 1; m_lo = m_up; end
        4: begin restore = 1; m_up = m_lo; end
        5: begin storeall = 1; m_lo = m_up; end
        default: ;
      endcase
      @(posedge clk); #1;
      idle();
    end
    @(negedge clk); check_read();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
