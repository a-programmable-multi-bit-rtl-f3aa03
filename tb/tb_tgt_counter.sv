// tb_tgt_counter: self-checking testbench for tgt_counter.
// Shifts random fault patterns into the target's chain MSB first (so element
// j holds bit j), then applies random operands and compares the outputs with
// and without FI Enable against a reference computed in the testbench.
// The counter must keep counting correctly through injections.
module tb_tgt_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fe_shift = 1'b0, fi_enable = 1'b0, scan_in = 1'b0;
  logic scan_out;
  logic en = 1'b0; logic [7:0] q;
  int checks = 0, failures = 0;

  tgt_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] cnt_model = 8'h00;
  always @(posedge clk) if (rst_n && en) cnt_model <= cnt_model + 8'h01;
  task automatic check(logic [7:0] m, string what);
    checks++;
    if (q !== (cnt_model ^ m)) begin
      failures++;
      $display("FAIL %s: count=%h m=%h q=%h", what, cnt_model, m, q);
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
        en = 1'($urandom);
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
