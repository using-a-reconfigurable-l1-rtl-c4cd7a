// rdc_ecell_row: one row of extended cells (e-cells), i.e. one physical cache row.
//
// Each e-cell is a pair of 6T bit-cells, the upper cell (word line WL1) and the
// lower cell (word line WL2), joined by two exchange circuits. At the logic
// level the row therefore holds two W-bit values, `upper` and `lower`:
//   WL1 + write  : UWrite, the masked write data goes to the upper cells
//   WL2 + write  : LWrite, the masked write data goes to the lower cells
//   WL1+WL2+write: ULWrite, the same data goes to both
//   WL1 (read)   : URead, upper value driven on the shared bit lines
//   WL2 (read)   : LRead, lower value driven on the shared bit lines
//   store        : Store, the left exchange circuit copies upper -> lower
//   restore      : Restore, the right exchange circuit copies lower -> upper
//   storeall     : StoreAll, global Store applied to every row at once
// The exchange circuits invert twice (Q -> P, P -> PB), so the lower cell ends
// up holding the same logical value as the upper cell; this model stores the
// logical value only. Writes, Store and Restore take effect at the clock edge;
// reads are combinational and a row whose word lines are low drives zero so
// that the way can OR all rows together like a wired bit line.
// The byte-granular write enable stands for per-column write drivers and is a
// choice of this design.
module rdc_ecell_row #(
  parameter int unsigned W = 512
) (
  input  logic           clk,
  input  logic           wl1,       // upper word line (already row-decoded)
  input  logic           wl2,       // lower word line (already row-decoded)
  input  logic           we,        // write, as opposed to read
  input  logic [W/8-1:0] be,        // byte write enables
  input  logic [W-1:0]   wdata,
  input  logic           store,     // row Store (upper -> lower)
  input  logic           restore,   // row Restore (lower -> upper)
  input  logic           storeall,  // array-wide StoreAll
  output logic [W-1:0]   rdata
);

  logic [W-1:0] upper, lower;

  always_ff @(posedge clk) begin
    if (store || storeall) begin
      lower <= upper;
    end else if (restore) begin
      upper <= lower;
    end else if (we) begin
      for (int unsigned i = 0; i < W/8; i++) begin
        if (be[i]) begin
          if (wl1) upper[i*8 +: 8] <= wdata[i*8 +: 8];
          if (wl2) lower[i*8 +: 8] <= wdata[i*8 +: 8];
        end
      end
    end
  end

  always_comb begin
    rdata = '0;
    if (!we) begin
      if (wl1)      rdata = upper;
      else if (wl2) rdata = lower;
    end
  end

endmodule
