// tb_mux4to1: self-check of the 4-to-1 multiplexer. Four distinct random
// values are applied and every select value must pass the matching input.
module tb_mux4to1;
  logic [7:0] d[4];
  logic [7:0] y;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  mux4to1 u_dut (.d0(d[0]), .d1(d[1]), .d2(d[2]), .d3(d[3]), .sel(sel), .y(y));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int k = 0; k < 4; k++) d[k] = 8'($urandom);
      // keep the inputs distinct so a wrong selection is always visible
      d[1] = d[0] ^ 8'h01; d[2] = d[0] ^ 8'h02; d[3] = d[0] ^ 8'h04;
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        checks++;
        if (y !== d[s]) begin
          failures++;
          $display("FAIL sel=%0d y=%h expected %h", s, y, d[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
