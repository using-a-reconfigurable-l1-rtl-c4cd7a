// rdc_data_way: data array of one RDC way.
//
// 128 rows of 512 e-cells (rdc_ecell_row) sharing one decoder (rdc_decoder).
// In general purpose mode the way holds 256 lines: the upper cells of row r
// hold set 2r and the lower cells set 2r+1. In TM mode it holds 128 lines,
// each with a new value in the upper cells and its shadow copy (old value) in
// the lower cells. The selected row drives its data onto the shared bit lines,
// modelled as an OR over all rows (unselected rows drive zero).
//
// Interface: `cs` selects the way, `idx` is A13..A6, `op` the TM-mode
// operation, `we` turns the access into a write with byte enables `be`.
// Timing: reads are combinational from the cell state; writes and the
// exchange operations (Store, Restore, StoreAll) complete at the clock edge,
// so every operation fits in a single cycle.
module rdc_data_way
  import rdc_pkg::*;
#(
  parameter int unsigned W = LINE_W
) (
  input  logic           clk,
  input  logic           tmm,
  input  logic           cs,
  input  logic [7:0]     idx,
  input  cell_op_e       op,
  input  logic           we,
  input  logic [W/8-1:0] be,
  input  logic [W-1:0]   wdata,
  output logic [W-1:0]   rdata
);

  logic [127:0] row_sel;
  logic         wl1, wl2, store, restore, storeall;
  logic [W-1:0] row_rdata [128];

  rdc_decoder u_dec (
    .tmm(tmm), .cs(cs), .idx(idx), .op(op),
    .row_sel(row_sel), .wl1(wl1), .wl2(wl2),
    .store(store), .restore(restore), .storeall(storeall)
  );

  for (genvar r = 0; r < 128; r++) begin : g_row
    rdc_ecell_row #(.W(W)) u_row (
      .clk     (clk),
      .wl1     (row_sel[r] & wl1),
      .wl2     (row_sel[r] & wl2),
      .we      (we),
      .be      (be),
      .wdata   (wdata),
      .store   (row_sel[r] & store),
      .restore (row_sel[r] & restore),
      .storeall(storeall),
      .rdata   (row_rdata[r])
    );
  end

  always_comb begin
    rdata = '0;
    for (int unsigned r = 0; r < 128; r++) rdata |= row_rdata[r];
  end

endmodule
