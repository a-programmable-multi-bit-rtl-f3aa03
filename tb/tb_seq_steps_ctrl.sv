// tb_seq_steps_ctrl: self-checking testbench for seq_steps_ctrl.
// Sends random 8-bit sequences under every limit 0..15 and checks, bit by
// bit, that mask rises exactly after the limit-th unmasked one, and that arm
// clears the count.
module tb_seq_steps_ctrl;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       arm = 1'b0, step = 1'b0, bit_in = 1'b0;
  logic [3:0] limit = '0;
  logic       mask;
  int checks = 0, failures = 0;

  seq_steps_ctrl #(.CNT_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 400; trial++) begin
      logic [7:0] seq;
      int sent;
      seq = 8'($urandom);
      @(negedge clk); limit = 4'(trial % 16); arm = 1'b1; step = 1'b0;
      @(negedge clk); arm = 1'b0;
      sent = 0;
      for (int i = 7; i >= 0; i--) begin
        step = 1'b1; bit_in = seq[i];
        #1;
        checks++;
        if (mask !== (sent >= int'(limit))) begin
          failures++;
          $display("FAIL trial %0d bit %0d: mask=%b sent=%0d limit=%0d", trial, i, mask, sent, limit);
        end
        if (seq[i] && sent < int'(limit)) sent++;
        @(negedge clk);
      end
      step = 1'b0;
      // Idle clocks with bit_in high must not count.
      bit_in = 1'b1;
      repeat (2) @(negedge clk);
      checks++;
      if (mask !== (sent >= int'(limit))) begin
        failures++;
        $display("FAIL idle count moved");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
