// tb_fi_switch_out: self-checking testbench for fi_switch_out.
// Every select value with random chain outputs: the selected chain's bit,
// or 0 past the last chain.
module tb_fi_switch_out;
  logic [2:0] sel = '0;
  logic [4:0] ch_out = '0;
  logic       dout;
  int checks = 0, failures = 0;

  fi_switch_out #(.N_CHAINS(5), .SEL_W(3)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      sel = 3'(i % 8);
      ch_out = 5'($urandom);
      #1;
      checks++;
      if (dout !== ((sel < 5) ? ch_out[sel] : 1'b0)) begin
        failures++;
        $display("FAIL sel=%0d ch_out=%b dout=%b", sel, ch_out, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
