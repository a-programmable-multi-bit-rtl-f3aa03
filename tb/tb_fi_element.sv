// tb_fi_element: self-checking testbench for fi_element.
// Checks the scan flip-flop (shift and hold) and that the net is inverted
// exactly when FI Enable and the stored bit are both 1, for all input cases.
module tb_fi_element;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fe_shift = 1'b0, fi_enable = 1'b0, scan_in = 1'b0, sig_in = 1'b0;
  logic scan_out, sig_out;
  int checks = 0, failures = 0;

  fi_element dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic q;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    q = 1'b0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      fe_shift  = 1'($urandom);
      fi_enable = 1'($urandom);
      scan_in   = 1'($urandom);
      sig_in    = 1'($urandom);
      #1;
      checks++;
      if (sig_out !== (sig_in ^ (fi_enable & q)) || scan_out !== q) begin
        failures++;
        $display("FAIL i=%0d en=%b q=%b sig_in=%b sig_out=%b", i, fi_enable, q, sig_in, sig_out);
      end
      @(posedge clk); #1;
      if (fe_shift) q = scan_in;
      checks++;
      if (scan_out !== q) begin
        failures++;
        $display("FAIL shift i=%0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
