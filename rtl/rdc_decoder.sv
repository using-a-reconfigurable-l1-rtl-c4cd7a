// rdc_decoder: address decoder and control of one RDC way.
//
// The 8 index bits A13..A6 reach the decoder in both modes; which of them are
// used depends on TMM:
//   general purpose (TMM=0): predecoder 1 <- A9..A7, predecoder 2 <- A12..A10,
//                            sub-bank select <- A13, a=1, b=A6, c=0
//   TM / dual-versioning (TMM=1): predecoder 1 <- A8..A6, predecoder 2 <- A11..A9,
//                            sub-bank select <- A12, a,b,c from the controller
// So in general purpose mode A13..A7 pick one of 128 rows and A6 picks upper
// or lower cells; in TM mode A13 is ignored and A12..A6 pick the row, while
// the operation code chooses the cells and exchange operation.
// The two one-hot predecodes are ANDed with the sub-bank select to form the
// 128 row selects. Control signal generator unit 2 derives WL1/WL2 and the
// Store/Restore/StoreAll enables. Everything is gated by the way select `cs`.
// Which predecoder input is its least significant bit is this design's choice.
// Purely combinational.
module rdc_decoder
  import rdc_pkg::*;
(
  input  logic           tmm,
  input  logic           cs,
  input  logic [7:0]     idx,      // A13..A6
  input  cell_op_e       op,       // used in TM mode only
  output logic [127:0]   row_sel,  // one-hot row select
  output logic           wl1,
  output logic           wl2,
  output logic           store,
  output logic           restore,
  output logic           storeall
);

  logic [2:0] pd1_in, pd2_in;
  logic       sub_bank;
  logic       a, b, c;
  logic [7:0] pd1, pd2;
  logic       g_store, g_restore, g_wl1, g_wl2, g_storeall;

  always_comb begin
    if (tmm) begin
      pd1_in   = idx[2:0];        // A8..A6
      pd2_in   = idx[5:3];        // A11..A9
      sub_bank = idx[6];          // A12
      {a, b, c} = op;
    end else begin
      pd1_in   = idx[3:1];        // A9..A7
      pd2_in   = idx[6:4];        // A12..A10
      sub_bank = idx[7];          // A13
      a = 1'b1;
      b = idx[0];                 // A6
      c = 1'b0;
    end
  end

  rdc_predecoder u_pd1 (.en(cs), .a(pd1_in), .y(pd1));
  rdc_predecoder u_pd2 (.en(cs), .a(pd2_in), .y(pd2));

  always_comb begin
    for (int unsigned r = 0; r < 128; r++) begin
      row_sel[r] = pd1[r % 8] & pd2[(r / 8) % 8] & (sub_bank == r[6]);
    end
  end

  rdc_ctrl_gen2 u_cg2 (
    .tmm(tmm), .a(a), .b(b), .c(c),
    .store(g_store), .restore(g_restore), .wl1(g_wl1), .wl2(g_wl2), .storeall(g_storeall)
  );

  assign wl1      = cs & g_wl1;
  assign wl2      = cs & g_wl2;
  assign store    = cs & g_store;
  assign restore  = cs & g_restore;
  assign storeall = cs & g_storeall;

endmodule
