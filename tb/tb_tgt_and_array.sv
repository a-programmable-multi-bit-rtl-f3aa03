// tb_tgt_and_array: self-checking testbench for tgt_and_array.
// Shifts random fault patterns into the target's chain MSB first (so element
// j holds bit j), then applies random operands and compares the outputs with
// and without FI Enable against a reference computed in the testbench.
module tb_tgt_and_array;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fe_shift = 1'b0, fi_enable = 1'b0, scan_in = 1'b0;
  logic scan_out;
  logic [7:0] a = '0, b = '0, c;
  int checks = 0, failures = 0;

  tgt_and_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [7:0] m, string what);
    checks++;
    if (c !== ((a & b) ^ m)) begin
      failures++;
      $display("FAIL %s: a=%h b=%h m=%h c=%h", what, a, b, m, c);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      logic [7:0] m;
      m = (t < 8) ? 8'(1 << t) : 8'($urandom);
      for (int i = 7; i >= 0; i--) begin
        @(negedge clk); fe_shift = 1'b1; scan_in = m[i];
      end
      @(negedge clk); fe_shift = 1'b0; scan_in = 1'b0;
      for (int k = 0; k < 6; k++) begin
        @(negedge clk);
        a = 8'($urandom); b = 8'($urandom);
        fi_enable = 1'b0; #1;
        check(8'h00, "no fault");
        fi_enable = 1'b1; #1;
        check(m, "fault");
        fi_enable = 1'b0;
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
