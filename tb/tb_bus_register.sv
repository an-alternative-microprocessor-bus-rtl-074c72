// tb_bus_register: self-check of the enabled register.
//
// Checks the reset value, that q changes only at a rising edge with ena = 1
// and holds otherwise, against a model kept in the testbench.
module tb_bus_register;
  logic       clk = 0, rst_n = 0, ena = 0;
  logic [7:0] x = 0, q, model;
  int checks = 0, failures = 0;

  bus_register u_dut (.clk(clk), .rst_n(rst_n), .ena(ena), .x(x), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, model);
    end
  endtask

  initial begin
    #12;
    model = 8'h00;
    check("reset");
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ena = ($urandom % 3) == 0;
      x   = 8'($urandom);
      #1 check("no change before the edge");
      @(posedge clk);
      if (ena) model = x;
      #1 check("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
