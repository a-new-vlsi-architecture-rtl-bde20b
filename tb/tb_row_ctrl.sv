// tb_row_ctrl: line-boundary control with a short line (M = 8, N = 2) and at
// the full line length (M = 512).  Counting clocks t from the first clock
// after reset, the expected column is t mod M, RST2 is high when the column
// is M-1, and the clear of row i is high in clock t if RST2 was high in
// clock t-i (or reset is active).  A reset in the middle of a line must
// restart the count.
module tb_row_ctrl;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] col_s;
  logic       rst2_s;
  logic       rst1_s [3];
  logic [8:0] col_l;
  logic       rst2_l;
  logic       rst1_l [3];
  int         t, ok;

  row_ctrl #(.M(8), .N(2)) dut_s (.clk(clk), .rst(rst), .col(col_s), .rst2(rst2_s), .rst1(rst1_s));
  row_ctrl                 dut_l (.clk(clk), .rst(rst), .col(col_l), .rst2(rst2_l), .rst1(rst1_l));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit clr_exp(input int tt, input int i, input int m);
    return (tt - i >= 0) && (((tt - i) % m) == m - 1);
  endfunction

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      rst <= 1'b1;
      repeat (2) @(posedge clk);
      #1;
      checks++;
      if (!(rst1_s[0] && rst1_s[1] && rst1_s[2] && rst1_l[0])) begin
        failures++; $display("clears not active during reset");
      end
      rst <= 1'b0;
      for (t = 0; t < ((pass == 0) ? 1500 : 43); t++) begin
        #1;
        ok = 1;
        if (int'(col_s) != t % 8)               ok = 0;
        if (rst2_s != (t % 8 == 7))             ok = 0;
        if (int'(col_l) != t % 512)             ok = 0;
        if (rst2_l != (t % 512 == 511))         ok = 0;
        for (int i = 0; i < 3; i++) begin
          if (rst1_s[i] != clr_exp(t, i, 8))   ok = 0;
          if (rst1_l[i] != clr_exp(t, i, 512)) ok = 0;
        end
        checks++;
        if (!ok) begin
          failures++;
          if (failures < 10) $display("t=%0d col=%0d/%0d rst2=%b/%b rst1=%b%b%b", t, col_s, col_l,
                                      rst2_s, rst2_l, rst1_s[0], rst1_s[1], rst1_s[2]);
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
