// tb_sipo: self-checking testbench for sipo.
// Shifts random bits with random shift enables and compares the parallel
// word with a reference history of the bits accepted.
module tb_sipo;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       shift = 1'b0, din = 1'b0;
  logic [7:0] q;
  int checks = 0, failures = 0;

  sipo #(.N(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist [$];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) hist.push_back(1'b0);
    for (int i = 0; i < 1000; i++) begin
      logic [7:0] exp;
      @(negedge clk);
      shift = 1'($urandom); din = 1'($urandom);
      @(posedge clk); #1;
      if (shift) hist.push_back(din);
      for (int j = 0; j < 8; j++) exp[j] = hist[hist.size() - 1 - j];
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL q=%h expected %h", q, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
