// tb_mux2to1: self-check of the 2-to-1 multiplexer with random data on both
// inputs and both select values.
module tb_mux2to1;
  logic [7:0] d0, d1, y;
  logic       sel;
  int checks = 0, failures = 0;

  mux2to1 u_dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      d0 = 8'($urandom); d1 = 8'($urandom); sel = i[0];
      #1;
      checks++;
      if (y !== (i[0] ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
