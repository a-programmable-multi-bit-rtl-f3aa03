// tb_tgt_adder4: self-checking testbench for tgt_adder4.
// Shifts random fault patterns into the target's chain MSB first (so element
// j holds bit j), then applies random operands and compares the outputs with
// and without FI Enable against a reference computed in the testbench.
// Faults on carries must reach the higher sum bits.
module tb_tgt_adder4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fe_shift = 1'b0, fi_enable = 1'b0, scan_in = 1'b0;
  logic scan_out;
  logic [3:0] a = '0, b = '0; logic [4:0] s;
  int checks = 0, failures = 0;

  tgt_adder4 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference ripple adder: m[2i] flips sum bit i, m[2i+1] flips the carry
  // out of bit i, which the next bit then uses.
  task automatic check(logic [7:0] m, string what);
    logic [4:0] exp;
    logic cy;
    cy = 1'b0;
    for (int i = 0; i < 4; i++) begin
      int tot;
      tot = int'(a[i]) + int'(b[i]) + int'(cy);
      exp[i] = tot[0] ^ m[2*i];
      cy = tot[1] ^ m[2*i+1];
    end
    exp[4] = cy;
    checks++;
    if (s !== exp) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d m=%h s=%h exp=%h", what, a, b, m, s, exp);
    end
    if (m == 0 && s !== 5'(a + b)) begin
      failures++;
      $display("FAIL plain sum");
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
        a = 4'($urandom); b = 4'($urandom);
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
