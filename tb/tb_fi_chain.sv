// tb_fi_chain: self-checking testbench for fi_chain.
// Shifts random 8-bit patterns in MSB first, checks that element j then
// holds bit j (seen through the injected nets), that the pattern leaves at
// scan_out in order, and that nets pass unchanged without FI Enable.
module tb_fi_chain;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       fe_shift = 1'b0, fi_enable = 1'b0, scan_in = 1'b0;
  logic       scan_out;
  logic [7:0] sig_in = '0, sig_out;
  int checks = 0, failures = 0;

  fi_chain #(.CHAIN_LEN(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    held = '0;
    for (int t = 0; t < 200; t++) begin
      logic [7:0] pat;
      logic [7:0] outbits;
      pat = 8'($urandom);
      for (int i = 7; i >= 0; i--) begin
        @(negedge clk); fe_shift = 1'b1; scan_in = pat[i];
        outbits[i] = scan_out;   // previous pattern leaves, MSB first
      end
      @(negedge clk); fe_shift = 1'b0; scan_in = 1'b0;
      checks++;
      if (outbits !== held) begin
        failures++;
        $display("FAIL scan_out order: got %h expected %h", outbits, held);
      end
      held = pat;
      for (int k = 0; k < 4; k++) begin
        sig_in = 8'($urandom);
        fi_enable = 1'b0; #1;
        checks++;
        if (sig_out !== sig_in) begin failures++; $display("FAIL pass-through"); end
        fi_enable = 1'b1; #1;
        checks++;
        if (sig_out !== (sig_in ^ pat)) begin
          failures++;
          $display("FAIL inject: sig_in=%h pat=%h sig_out=%h", sig_in, pat, sig_out);
        end
        fi_enable = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
