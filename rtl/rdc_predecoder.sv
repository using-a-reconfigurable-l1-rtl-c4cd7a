// rdc_predecoder: 3-to-8 predecoder of the RDC row decoder.
//
// Two of these, each fed by three address bits, produce one-hot partial
// decodes that the address decoder ANDs together. The output is all zero when
// `en` is low. Purely combinational. The 3-to-8 split of the row address and
// the two predecoders follow the decoder organisation of the RDC; the enable
// input, which carries the chip select of the way, is this design's choice.
module rdc_predecoder (
  input  logic       en,
  input  logic [2:0] a,
  output logic [7:0] y
);

  always_comb begin
    y = '0;
    if (en) y[a] = 1'b1;
  end

endmodule
