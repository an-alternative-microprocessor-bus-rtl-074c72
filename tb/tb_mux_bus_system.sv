// tb_mux_bus_system: end-to-end self-check of the multiplexed-bus
// microprocessor at its default size.
//
// The run follows the document's demonstration through the command port:
//   1. LOAD 55, 77, 99, 0 into R3, R2, R1, R0;
//   2. MOVE R1->R0, R2->R1, R3->R2, R0->R3, rotating the values so that
//      R0..R3 = 99, 77, 55, 99;
//   3. sweep the ALU over every operand select and opcode, including the
//      document's example select 10 / ADD giving 10000100.
// Then a random mix of LOAD, MOVE and idle cycles runs against a model. The
// model applies each command two rising edges after it is presented (one in
// the control unit, one on the bus), and the testbench checks every register
// every cycle, so an early or late write fails. Each mechanism (load, move,
// idle, all four ops, all four selects, ADD carry, SUB borrow) is counted and
// must occur at least once.
module tb_mux_bus_system;
  import bus_pkg::*;

  logic       clk = 0, rst_n = 0, cmd_valid = 0;
  bus_cmd_t   cmd = '0;
  logic [7:0] data = 0;
  alu_sel_t   select = SEL_R3_R1;
  alu_op_t    op = ALU_ADD;
  logic [7:0] R0, R1, R2, R3, bus, out;
  logic       cout;
  int checks = 0, failures = 0;

  // reference state
  logic [7:0] m[4];
  // command pipeline of the model: what is on the bus in the coming cycle
  logic       p_valid = 0;
  bus_cmd_t   p_cmd = '0;
  logic [7:0] p_data = 0;

  // event counters
  int n_load = 0, n_move = 0, n_idle = 0, n_carry = 0, n_borrow = 0;
  int n_op[4] = '{default: 0};
  int n_sel[4] = '{default: 0};

  mux_bus_system u_dut (.clk(clk), .rst_n(rst_n), .cmd_valid(cmd_valid), .cmd(cmd),
                        .data(data), .select(select), .op(op), .R0(R0), .R1(R1), .R2(R2),
                        .R3(R3), .bus(bus), .out(out), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [8:0] ref_alu(input logic [7:0] a, input logic [7:0] b, input alu_op_t o);
    case (o)
      ALU_ADD: return {1'b0, a} + {1'b0, b};
      ALU_SUB: return {1'b0, a} - {1'b0, b};
      ALU_SHL: return {1'b0, a[6:0], 1'b0};
      default: return {1'b0, a & b};
    endcase
  endfunction

  task automatic check_regs();
    logic [7:0] got[4];
    got = '{R0, R1, R2, R3};
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (got[i] !== m[i]) begin
        failures++;
        $display("FAIL t=%0t R%0d=%0d expected %0d", $time, i, got[i], m[i]);
      end
    end
  endtask

  task automatic check_alu();
    logic [8:0] e;
    e = ref_alu(select[1] ? m[2] : m[3], select[0] ? m[0] : m[1], op);
    checks++;
    n_op[op]++;
    n_sel[select]++;
    if (op == ALU_ADD && e[8]) n_carry++;
    if (op == ALU_SUB && e[8]) n_borrow++;
    if ({cout, out} !== e) begin
      failures++;
      $display("FAIL alu select=%b op=%b out=%b cout=%b expected %b %b",
               select, op, out, cout, e[7:0], e[8]);
    end
  endtask

  // One clock cycle: present a command (or none) at the falling edge, let the
  // rising edge happen, update the model, check the registers.
  task automatic step(input logic v, input bus_cmd_t c, input logic [7:0] d);
    @(negedge clk);
    cmd_valid = v; cmd = c; data = d;
    // the command sampled last edge is on the bus now (LOAD takes data now)
    if (p_valid) begin
      logic [7:0] ebus;
      ebus = (p_cmd.kind == CMD_LOAD) ? data : m[p_cmd.src];
      #1;
      checks++;
      if (bus !== ebus) begin
        failures++;
        $display("FAIL t=%0t bus=%0d expected %0d", $time, bus, ebus);
      end
    end
    @(posedge clk);
    if (p_valid) m[p_cmd.dst] = (p_cmd.kind == CMD_LOAD) ? data : m[p_cmd.src];
    p_valid = v; p_cmd = c;
    if (!v) n_idle++;
    else if (c.kind == CMD_LOAD) n_load++;
    else n_move++;
    #1 check_regs();
  endtask

  function automatic bus_cmd_t mk(input cmd_kind_t k, input int src, input int dst);
    bus_cmd_t c;
    c.kind = k; c.src = reg_idx_t'(src); c.dst = reg_idx_t'(dst);
    return c;
  endfunction

  initial begin
    for (int i = 0; i < 4; i++) m[i] = 8'd0;
    #12;
    check_regs();
    rst_n = 1;

    // 1. loads: the data must be on the input in the cycle after the command,
    // when the control unit opens the bus to it; data for each LOAD is
    // therefore presented together with the following command.
    step(1'b1, mk(CMD_LOAD, 0, 3), 8'd0);
    step(1'b1, mk(CMD_LOAD, 0, 2), 8'd55);
    step(1'b1, mk(CMD_LOAD, 0, 1), 8'd77);
    step(1'b1, mk(CMD_LOAD, 0, 0), 8'd99);
    // 2. rotation over the bus
    step(1'b1, mk(CMD_MOVE, 1, 0), 8'd0);
    step(1'b1, mk(CMD_MOVE, 2, 1), 8'd0);
    step(1'b1, mk(CMD_MOVE, 3, 2), 8'd0);
    step(1'b1, mk(CMD_MOVE, 0, 3), 8'd0);
    step(1'b0, '0, 8'd0);
    step(1'b0, '0, 8'd0);
    checks++;
    if (R0 != 8'd99 || R1 != 8'd77 || R2 != 8'd55 || R3 != 8'd99) begin
      failures++;
      $display("FAIL rotation: R0..R3 = %0d %0d %0d %0d", R0, R1, R2, R3);
    end
    // 3. ALU sweep, with the document's worked example first
    select = SEL_R2_R1; op = ALU_ADD;
    #1;
    checks++;
    if (out !== 8'b10000100 || cout !== 1'b0) begin
      failures++;
      $display("FAIL worked example: out=%b cout=%b", out, cout);
    end
    for (int s = 0; s < 4; s++)
      for (int o = 0; o < 4; o++) begin
        select = alu_sel_t'(s); op = alu_op_t'(o);
        #1 check_alu();
      end

    // 4. random traffic
    for (int i = 0; i < 4000; i++) begin
      logic v;
      v = ($urandom % 5) != 0;
      step(v, mk(cmd_kind_t'($urandom % 2), $urandom % 4, $urandom % 4), 8'($urandom));
      select = alu_sel_t'($urandom); op = alu_op_t'($urandom);
      #1 check_alu();
    end

    // every mechanism must have happened
    begin
      int counts[12];
      string names[12];
      counts = '{n_load, n_move, n_idle, n_carry, n_borrow,
                 n_op[0], n_op[1], n_op[2], n_op[3], n_sel[1], n_sel[2], n_sel[3]};
      names  = '{"load", "move", "idle", "add carry", "sub borrow",
                 "ADD", "SUB", "SHL", "AND", "select 01", "select 10", "select 11"};
      for (int k = 0; k < 12; k++) begin
        $display("mechanism %-10s : %0d", names[k], counts[k]);
        checks++;
        if (counts[k] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", names[k]);
        end
      end
      checks++;
      if (n_sel[0] == 0) begin
        failures++;
        $display("FAIL mechanism select 00 never happened");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
