// tb_rdc_predecoder: exhaustive check of the 3-to-8 predecoder, enabled and
// disabled, against a shift-based reference.
module tb_rdc_predecoder;
  logic       en;
  logic [2:0] a;
  logic [7:0] y;
  int checks = 0, failures = 0;

  rdc_predecoder dut (.en(en), .a(a), .y(y));

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < 8; i++) begin
        en = e[0]; a = i[2:0];
        #1;
        checks++;
        if (y !== (e[0] ? (8'd1 << i) : 8'd0)) begin
          failures++;
          $display("FAIL en=%0d a=%0d y=%b", e, i, y);
        end
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
