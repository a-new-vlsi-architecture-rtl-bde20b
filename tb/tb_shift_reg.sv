// tb_shift_reg: the line shift register at its full length (511 stages).
// Random words are shifted in; each output is compared with the input of
// LEN clocks earlier (zero during the first LEN clocks after reset).  A
// second reset in the middle checks that all stages are cleared.
module tb_shift_reg;
  localparam int LEN = 511;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst = 1'b1;
  logic [3:0] din = '0, dout;
  int         hist [$];
  int         expv;

  shift_reg dut (.clk(clk), .rst(rst), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      rst <= 1'b1;
      @(posedge clk);
      rst <= 1'b0;
      hist.delete();
      for (int k = 0; k < LEN; k++) hist.push_back(0);
      for (int t = 0; t < 3 * LEN; t++) begin
        din <= 4'($urandom);
        #1;
        expv = hist[hist.size() - LEN];
        checks++;
        if (int'(dout) != expv) begin
          failures++;
          if (failures < 10) $display("t=%0d dout=%0d expected %0d", t, dout, expv);
        end
        @(posedge clk);
        hist.push_back(int'(din));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
