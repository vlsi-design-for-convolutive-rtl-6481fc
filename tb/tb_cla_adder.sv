// tb_cla_adder: checks the carry-lookahead adder against the + operator for
// corner operands and random operands, at a width that is not a multiple of
// the 4-bit group (25) and at one that is (16).
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [24:0] a25, b25, s25;  logic ci25, co25;
  logic [15:0] a16, b16, s16;  logic ci16, co16;

  cla_adder #(.W(25)) dut25 (.a(a25), .b(b25), .cin(ci25), .s(s25), .cout(co25));
  cla_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .s(s16), .cout(co16));

  task automatic check25(input logic [24:0] a, input logic [24:0] b, input logic c);
    logic [25:0] ref_sum;
    a25 = a; b25 = b; ci25 = c;
    #1;
    ref_sum = {1'b0, a} + {1'b0, b} + 26'(c);
    checks++;
    if ({co25, s25} !== ref_sum) begin
      failures++;
      $display("FAIL W=25 %h + %h + %0d = %h, expected %h", a, b, c, {co25, s25}, ref_sum);
    end
  endtask

  task automatic check16(input logic [15:0] a, input logic [15:0] b, input logic c);
    logic [16:0] ref_sum;
    a16 = a; b16 = b; ci16 = c;
    #1;
    ref_sum = {1'b0, a} + {1'b0, b} + 17'(c);
    checks++;
    if ({co16, s16} !== ref_sum) begin
      failures++;
      $display("FAIL W=16 %h + %h + %0d = %h, expected %h", a, b, c, {co16, s16}, ref_sum);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check25('0, '0, 1'b0);
    check25('1, 25'd1, 1'b0);
    check25('1, '0, 1'b1);
    check25('1, '1, 1'b1);
    check25(25'h0aaaaaa, 25'h1555555, 1'b1);
    check16('1, 16'd1, 1'b0);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h7fff, 16'h0001, 1'b0);
    for (int i = 0; i < 2000; i++) begin
      check25(25'($urandom), 25'($urandom), 1'($urandom));
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
