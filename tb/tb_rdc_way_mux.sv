// tb_rdc_way_mux: random data on the four inputs, every select value checked.
module tb_rdc_way_mux;
  import rdc_pkg::*;
  logic [LINE_W-1:0] din [WAYS];
  logic [1:0]        sel;
  logic [LINE_W-1:0] dout;
  int checks = 0, failures = 0;

  rdc_way_mux dut (.din(din), .sel(sel), .dout(dout));

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int w = 0; w < WAYS; w++)
        for (int k = 0; k < LINE_W / 32; k++) din[w][k*32 +: 32] = $urandom;
      for (int s = 0; s < WAYS; s++) begin
        sel = s[1:0];
        #1;
        checks++;
        if (dout !== din[s]) begin
          failures++;
          $display("FAIL sel=%0d", s);
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
