// tb_add_tree: random self-check of the adder tree for the operand counts
// the filter uses (4 for a second-order FIR row, 7 for an IIR row, and the
// degenerate single operand), comparing with a modulo-2^W sum.
module tb_add_tree;
  int checks = 0, failures = 0;

  logic [3:0] op4 [4];
  logic [3:0] s4;
  logic [7:0] op7 [7];
  logic [7:0] s7;
  logic [5:0] op1 [1];
  logic [5:0] s1;
  int exp4, exp7;

  add_tree                    dut4 (.op(op4), .sum(s4));
  add_tree #(.NUM(7), .W(8))  dut7 (.op(op7), .sum(s7));
  add_tree #(.NUM(1), .W(6))  dut1 (.op(op1), .sum(s1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      exp4 = 0; exp7 = 0;
      for (int k = 0; k < 4; k++) begin op4[k] = 4'($urandom); exp4 += op4[k]; end
      for (int k = 0; k < 7; k++) begin op7[k] = 8'($urandom); exp7 += op7[k]; end
      op1[0] = 6'($urandom);
      #1;
      checks += 3;
      if (int'(s4) != (exp4 & 15))  begin failures++; $display("NUM=4: %0d expected %0d", s4, exp4 & 15); end
      if (int'(s7) != (exp7 & 255)) begin failures++; $display("NUM=7: %0d expected %0d", s7, exp7 & 255); end
      if (s1 != op1[0])             begin failures++; $display("NUM=1: %0d expected %0d", s1, op1[0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
