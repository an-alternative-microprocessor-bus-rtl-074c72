// tb_bus_control_unit: self-check of the command-to-control-signal mapping.
//
// Random LOAD, MOVE and idle cycles are applied. One cycle after each sampled
// command the outputs must be: enable = 1 for LOAD, move = src for MOVE,
// write = one-hot(dst); and all idle after a cycle without a command.
module tb_bus_control_unit;
  import bus_pkg::*;

  logic      clk = 0, rst_n = 0, cmd_valid = 0;
  bus_cmd_t  cmd = '0;
  logic      enable;
  reg_idx_t  move;
  logic [3:0] write;
  int checks = 0, failures = 0;

  bus_control_unit u_dut (.clk(clk), .rst_n(rst_n), .cmd_valid(cmd_valid), .cmd(cmd),
                          .enable(enable), .move(move), .write(write));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic een, input reg_idx_t emove, input logic [3:0] ewrite);
    checks++;
    if (enable !== een || move !== emove || write !== ewrite) begin
      failures++;
      $display("FAIL t=%0t enable=%b move=%0d write=%b, expected %b %0d %b",
               $time, enable, move, write, een, emove, ewrite);
    end
  endtask

  initial begin
    logic     v;
    bus_cmd_t c;
    #12;
    check(1'b0, 2'd0, 4'b0000);  // reset values
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      v = ($urandom % 4) != 0;
      c.kind = cmd_kind_t'($urandom % 2);
      c.src  = reg_idx_t'($urandom);
      c.dst  = reg_idx_t'($urandom);
      cmd_valid = v; cmd = c;
      @(posedge clk);
      #1;
      if (!v)                  check(1'b0, 2'd0, 4'b0000);
      else if (c.kind == CMD_LOAD) check(1'b1, 2'd0, 4'b0001 << c.dst);
      else                     check(1'b0, c.src, 4'b0001 << c.dst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
