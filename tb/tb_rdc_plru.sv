// tb_rdc_plru: tree pseudo-LRU. After touching the ways of a set in an order,
// the victim must equal that of an independent 3-bit tree model; touching all
// four ways in order 0,1,2,3 must make way 0 the victim. Sets are independent.
module tb_rdc_plru;
  logic       clk = 0, rst_n = 0;
  logic [7:0] idx;
  logic [1:0] victim, touch_way;
  logic       touch;
  logic [2:0] m [256];
  int checks = 0, failures = 0;

  rdc_plru dut (.*);

  always #5 clk = ~clk;

  function automatic logic [1:0] model_victim(input logic [2:0] t);
    if (!t[0]) return {1'b0, t[1]};
    return {1'b1, t[2]};
  endfunction

  task automatic tch(input logic [7:0] i, input logic [1:0] w);
    @(negedge clk); idx = i; touch_way = w; touch = 1;
    @(posedge clk); #1; touch = 0;
    m[i][0] = ~w[1];
    if (!w[1]) m[i][1] = ~w[0]; else m[i][2] = ~w[0];
  endtask

  task automatic chk(input logic [7:0] i);
    @(negedge clk); idx = i; #1;
    checks++;
    if (victim !== model_victim(m[i])) begin
      failures++;
      $display("FAIL set %0d victim %0d exp %0d", i, victim, model_victim(m[i]));
    end
  endtask

  initial begin
    touch = 0; idx = 0; touch_way = 0;
    for (int i = 0; i < 256; i++) m[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int w = 0; w < 4; w++) tch(8'd3, w[1:0]);
    chk(8'd3);
    checks++;
    if (victim !== 2'd0) begin failures++; $display("FAIL order 0..3 victim %0d", victim); end
    for (int n = 0; n < 500; n++) begin
      logic [7:0] i = 8'($urandom_range(0, 15));
      tch(i, 2'($urandom));
      chk(8'($urandom_range(0, 15)));
      chk(i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
