// rdc_plru: replacement logic of the RDC, tree pseudo-LRU over 4 ways.
//
// Three bits per set form a binary tree; bit 0 chooses between the way pairs
// {0,1} and {2,3}, bits 1 and 2 choose inside each pair, and every bit points
// away from the most recently used side. `victim` is the way the tree points to
// for set `idx` (combinational). `touch` with `touch_way` marks a way as most
// recently used at the clock edge. Reset clears all trees. The replacement
// policy itself is this design's choice; the controller prefers an invalid way
// before asking this block.
module rdc_plru #(
  parameter int unsigned SETS = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(SETS)-1:0] idx,
  output logic [1:0]              victim,
  input  logic                    touch,
  input  logic [1:0]              touch_way
);

  logic [2:0] tree [SETS];
  logic [2:0] t;

  always_comb begin
    t = tree[idx];
    if (!t[0]) victim = {1'b0, t[1]};
    else       victim = {1'b1, t[2]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < SETS; i++) tree[i] <= '0;
    end else if (touch) begin
      tree[idx][0] <= ~touch_way[1];
      if (!touch_way[1]) tree[idx][1] <= ~touch_way[0];
      else               tree[idx][2] <= ~touch_way[0];
    end
  end

endmodule
