// tb_alu: exhaustive self-check of the ALU.
//
// Every pair of 8-bit operands is applied with every opcode, and out/cout are
// compared with a reference computed here in plain integer arithmetic. The
// operand/result pairs shown in the document's ALU waveform are checked by
// name as well.
module tb_alu;
  import bus_pkg::*;

  logic [7:0] a, b, out;
  logic       cout;
  alu_op_t    op;
  int checks = 0, failures = 0;

  alu u_dut (.a(a), .b(b), .op(op), .out(out), .cout(cout));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_op(input logic [7:0] ta, input logic [7:0] tb_, input alu_op_t top,
                           input logic [7:0] eout, input logic ecout);
    a = ta; b = tb_; op = top;
    #1;
    checks++;
    if (out !== eout || cout !== ecout) begin
      failures++;
      $display("FAIL %s a=%b b=%b: out=%b cout=%b, expected %b %b",
               top.name(), ta, tb_, out, cout, eout, ecout);
    end
  endtask

  initial begin
    int ia, ib;
    int ref_v;
    // worked examples from the document's ALU waveform
    expect_op(8'b00000010, 8'b00010100, ALU_ADD, 8'b00010110, 1'b0);
    expect_op(8'b00000010, 8'b00010100, ALU_SUB, 8'b11101110, 1'b1);
    expect_op(8'b00000010, 8'b00010100, ALU_SHL, 8'b00000100, 1'b0);
    expect_op(8'b00000010, 8'b00010100, ALU_AND, 8'b00000000, 1'b0);
    expect_op(8'b00100110, 8'b10001110, ALU_AND, 8'b00000110, 1'b0);
    expect_op(8'b00100110, 8'b10001110, ALU_ADD, 8'b10110100, 1'b0);
    expect_op(8'd255, 8'd1, ALU_ADD, 8'd0, 1'b1);
    // exhaustive sweep
    for (ia = 0; ia < 256; ia++) begin
      for (ib = 0; ib < 256; ib++) begin
        ref_v = ia + ib;
        expect_op(8'(ia), 8'(ib), ALU_ADD, 8'(ref_v), ref_v > 255);
        ref_v = ia - ib;
        expect_op(8'(ia), 8'(ib), ALU_SUB, 8'(ref_v), ia < ib);
        expect_op(8'(ia), 8'(ib), ALU_SHL, 8'((ia * 2) % 256), 1'b0);
        expect_op(8'(ia), 8'(ib), ALU_AND, 8'(ia & ib), 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
