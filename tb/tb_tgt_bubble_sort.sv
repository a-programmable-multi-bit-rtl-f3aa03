// tb_tgt_bubble_sort: self-checking testbench for tgt_bubble_sort.
// Shifts random fault patterns into the target's chain MSB first (so element
// j holds bit j), then applies random operands and compares the outputs with
// and without FI Enable against a reference computed in the testbench.
// Sorting is checked against the language sort() method.
module tb_tgt_bubble_sort;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fe_shift = 1'b0, fi_enable = 1'b0, scan_in = 1'b0;
  logic scan_out;
  logic [3:0][1:0] din = '0, dout;
  int checks = 0, failures = 0;

  tgt_bubble_sort dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [7:0] m, string what);
    int v [4];
    logic [7:0] exp;
    for (int i = 0; i < 4; i++) v[i] = int'(din[i]);
    v.sort();
    for (int i = 0; i < 4; i++) exp[2*i +: 2] = 2'(v[i]);
    checks++;
    if (dout !== (exp ^ m)) begin
      failures++;
      $display("FAIL %s: din=%h m=%h dout=%h exp=%h", what, din, m, dout, exp);
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
        din = 8'($urandom);
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
