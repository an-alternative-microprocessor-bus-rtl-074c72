// tb_mux_bus_datapath: self-check of the multiplexed-bus datapath.
//
// First the document's demonstration is replayed cycle by cycle: the decimal
// values 55, 77, 99 and 0 are loaded into R3, R2, R1 and R0 from the data
// input, then rotated over the bus (R0 <- R1, R1 <- R2, R2 <- R3, R3 <- R0),
// and the ALU is swept over all operand selects and opcodes, including the
// document's worked example R2 + R1 = 00110111 + 01001101 = 10000100.
// Then a long random run of loads and moves is compared with a register
// model, checking the bus, all registers and the ALU outputs every cycle.
module tb_mux_bus_datapath;
  import bus_pkg::*;

  logic       clk = 0, rst_n = 0, enable = 0;
  logic [7:0] data = 0;
  reg_idx_t   move = 0;
  logic [3:0] write = 0;
  alu_sel_t   select = SEL_R3_R1;
  alu_op_t    op = ALU_ADD;
  logic [3:0][7:0] r;
  logic [7:0] bus, out;
  logic       cout;
  logic [7:0] m[4];
  int checks = 0, failures = 0;

  mux_bus_datapath u_dut (.clk(clk), .rst_n(rst_n), .data(data), .enable(enable), .move(move),
                          .write(write), .select(select), .op(op), .r(r), .bus(bus),
                          .out(out), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic check_regs(input string what);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (r[i] !== m[i]) begin
        failures++;
        $display("FAIL %s: R%0d=%0d expected %0d", what, i, r[i], m[i]);
      end
    end
  endtask

  task automatic check_alu();
    logic [7:0] a, b;
    logic [8:0] e;
    a = select[1] ? m[2] : m[3];
    b = select[0] ? m[0] : m[1];
    e = ref_alu(a, b, op);
    checks++;
    if ({cout, out} !== e) begin
      failures++;
      $display("FAIL alu select=%b op=%b: out=%b cout=%b expected %b %b",
               select, op, out, cout, e[7:0], e[8]);
    end
  endtask

  // one bus cycle: drive the controls, check the bus, clock it in
  task automatic bus_cycle(input logic en, input logic [7:0] d, input reg_idx_t mv, input logic [3:0] wr);
    logic [7:0] ebus;
    @(negedge clk);
    enable = en; data = d; move = mv; write = wr;
    #1;
    ebus = en ? d : m[mv];
    checks++;
    if (bus !== ebus) begin
      failures++;
      $display("FAIL bus=%0d expected %0d", bus, ebus);
    end
    @(posedge clk);
    for (int i = 0; i < 4; i++) if (wr[i]) m[i] = ebus;
    #1 check_regs("after bus cycle");
  endtask

  initial begin
    for (int i = 0; i < 4; i++) m[i] = 8'd0;
    #12;
    check_regs("reset");
    rst_n = 1;

    // load 55, 77, 99, 0 into R3, R2, R1, R0
    bus_cycle(1'b1, 8'd55, 2'd0, 4'b1000);
    bus_cycle(1'b1, 8'd77, 2'd0, 4'b0100);
    bus_cycle(1'b1, 8'd99, 2'd0, 4'b0010);
    bus_cycle(1'b1, 8'd0,  2'd0, 4'b0001);
    // rotate over the bus
    bus_cycle(1'b0, 8'd0, 2'd1, 4'b0001);  // R0 <- R1
    bus_cycle(1'b0, 8'd0, 2'd2, 4'b0010);  // R1 <- R2
    bus_cycle(1'b0, 8'd0, 2'd3, 4'b0100);  // R2 <- R3
    bus_cycle(1'b0, 8'd0, 2'd0, 4'b1000);  // R3 <- R0
    @(negedge clk);
    write = 4'b0000;
    checks++;
    if (r[0] != 8'd99 || r[1] != 8'd77 || r[2] != 8'd55 || r[3] != 8'd99) begin
      failures++;
      $display("FAIL rotation result R0..R3 = %0d %0d %0d %0d", r[0], r[1], r[2], r[3]);
    end
    // the document's worked example: select 10, ADD -> 10000100, no carry
    select = SEL_R2_R1; op = ALU_ADD;
    #1;
    checks++;
    if (out !== 8'b10000100 || cout !== 1'b0) begin
      failures++;
      $display("FAIL worked example: out=%b cout=%b", out, cout);
    end
    // select 10, SUB: 55 - 77 = 11101010 with borrow
    op = ALU_SUB;
    #1;
    checks++;
    if (out !== 8'b11101010 || cout !== 1'b1) begin
      failures++;
      $display("FAIL SUB example: out=%b cout=%b", out, cout);
    end
    // select 00 pairs R3 with R1: 99 + 77 = 176
    select = SEL_R3_R1; op = ALU_ADD;
    #1;
    checks++;
    if (out !== 8'd176) begin
      failures++;
      $display("FAIL select 00: out=%0d expected 176", out);
    end
    // all operand pairs and ops
    for (int s = 0; s < 4; s++) begin
      for (int o = 0; o < 4; o++) begin
        select = alu_sel_t'(s); op = alu_op_t'(o);
        #1 check_alu();
      end
    end

    // random traffic
    for (int i = 0; i < 5000; i++) begin
      logic en;
      en = ($urandom % 3) == 0;
      bus_cycle(en, 8'($urandom), reg_idx_t'($urandom), 4'($urandom));
      select = alu_sel_t'($urandom); op = alu_op_t'($urandom);
      #1 check_alu();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
