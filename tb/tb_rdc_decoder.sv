// tb_rdc_decoder: exhaustive check of the way decoder over mode, index, chip
// select and operation. Reference: the selected row is A13..A7 in general
// purpose mode and A12..A6 in TM mode; in general purpose mode A6 picks WL1
// (0) or WL2 (1); in TM mode the operation code picks the cells/exchange.
module tb_rdc_decoder;
  import rdc_pkg::*;
  logic         tmm, cs;
  logic [7:0]   idx;
  cell_op_e     op;
  logic [127:0] row_sel;
  logic         wl1, wl2, store, restore, storeall;
  int checks = 0, failures = 0;

  rdc_decoder dut (.*);

  cell_op_e ops [6] = '{OP_STOREALL, OP_ULWRITE, OP_UPPER, OP_LOWER, OP_RESTORE, OP_STORE};

  initial begin
    for (int t = 0; t < 2; t++) begin
      for (int s = 0; s < 2; s++) begin
        for (int i = 0; i < 256; i++) begin
          for (int o = 0; o < 6; o++) begin
            logic [127:0] exp_row;
            logic         e1, e2, es, er, ea;
            tmm = t[0]; cs = s[0]; idx = i[7:0]; op = ops[o];
            #1;
            exp_row = '0;
            if (s) exp_row[t ? i[6:0] : i[7:1]] = 1'b1;
            if (t) begin
              e1 = (ops[o] == OP_UPPER) || (ops[o] == OP_ULWRITE);
              e2 = (ops[o] == OP_LOWER) || (ops[o] == OP_ULWRITE);
              es = (ops[o] == OP_STORE);
              er = (ops[o] == OP_RESTORE);
              ea = (ops[o] == OP_STOREALL);
            end else begin
              e1 = !i[0]; e2 = i[0]; es = 0; er = 0; ea = 0;
            end
            if (!s) {e1, e2, es, er, ea} = '0;
            checks++;
            if (row_sel !== exp_row || {wl1, wl2, store, restore, storeall} !== {e1, e2, es, er, ea}) begin
              failures++;
              if (failures < 10)
                $display("FAIL tmm=%0d cs=%0d idx=%0d op=%s ctrl=%b exp=%b", t, s, i,
                         ops[o].name(), {wl1, wl2, store, restore, storeall}, {e1, e2, es, er, ea});
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
