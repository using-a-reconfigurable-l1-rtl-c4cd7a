// rdc_ctrl_gen2: control signal generator unit 2 of the RDC decoder.
//
// Turns the mode signal TMM and the three operation bits a, b, c into the
// word-line and exchange-circuit enables of one way:
//   Store    = TMM a  b  c
//   Restore  = TMM ~a b  c
//   WL1      = a ~b ~c + ~a ~b c
//   WL2      = ~a ~b c + a b ~c
//   StoreAll = TMM ~a ~b ~c
// In general purpose mode the decoder drives a=1, b=A6, c=0, so WL1 selects the
// upper cells for even sets and WL2 the lower cells for odd sets, and the
// exchange enables stay low. Purely combinational.
module rdc_ctrl_gen2 (
  input  logic tmm,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic store,
  output logic restore,
  output logic wl1,
  output logic wl2,
  output logic storeall
);

  always_comb begin
    store    = tmm &  a &  b &  c;
    restore  = tmm & ~a &  b &  c;
    wl1      = (a & ~b & ~c) | (~a & ~b & c);
    wl2      = (~a & ~b & c) | (a & b & ~c);
    storeall = tmm & ~a & ~b & ~c;
  end

endmodule
