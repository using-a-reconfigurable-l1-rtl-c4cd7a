// tb_rdc_ctrl_gen2: exhaustive check of control signal generator unit 2.
// The reference is the operation table: in TM mode {a,b,c} = 100 upper cells,
// 110 lower cells, 001 both, 111 Store, 011 Restore, 000 StoreAll; in general
// purpose mode (a=1, c=0) b selects upper (0) or lower (1) cells and no
// exchange signal may rise.
module tb_rdc_ctrl_gen2;
  logic tmm, a, b, c;
  logic store, restore, wl1, wl2, storeall;
  int checks = 0, failures = 0;

  rdc_ctrl_gen2 dut (.*);

  task automatic expect5(input logic es, er, e1, e2, ea);
    checks++;
    if ({store, restore, wl1, wl2, storeall} !== {es, er, e1, e2, ea}) begin
      failures++;
      $display("FAIL tmm=%0d abc=%0d%0d%0d got %b exp %b", tmm, a, b, c,
               {store, restore, wl1, wl2, storeall}, {es, er, e1, e2, ea});
    end
  endtask

  initial begin
    for (int t = 0; t < 2; t++) begin
      for (int code = 0; code < 8; code++) begin
        tmm = t[0]; {a, b, c} = code[2:0];
        #1;
        case (code)
          3'b100: expect5(0, 0, 1, 0, 0);
          3'b110: expect5(0, 0, 0, 1, 0);
          3'b001: expect5(0, 0, 1, 1, 0);
          3'b111: expect5(t[0], 0, 0, 0, 0);
          3'b011: expect5(0, t[0], 0, 0, 0);
          3'b000: expect5(0, 0, 0, 0, t[0]);
          default: expect5(0, 0, 0, 0, 0);   // 010, 101 unused
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
