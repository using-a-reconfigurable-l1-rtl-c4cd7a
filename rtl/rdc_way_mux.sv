// rdc_way_mux: the 4:1 data output multiplexer of the RDC.
//
// Selects the 512-bit line read from the way given by `sel` (binary way number
// derived from the tag comparators). Purely combinational. The mux after the
// ways follows the cache organisation; the binary select (rather than the
// one-hot hit vector) is this design's choice.
module rdc_way_mux
  import rdc_pkg::*;
#(
  parameter int unsigned N = WAYS,
  parameter int unsigned W = LINE_W
) (
  input  logic [W-1:0]         din [N],
  input  logic [$clog2(N)-1:0] sel,
  output logic [W-1:0]         dout
);

  always_comb begin
    dout = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (sel == i[$clog2(N)-1:0]) dout = din[i];
    end
  end

endmodule
