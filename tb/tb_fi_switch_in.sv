// tb_fi_switch_in: self-checking testbench for fi_switch_in.
// Every select value (including ones past the last chain) with random
// inputs: only the selected chain may see FI Enable, FI Input and shift.
module tb_fi_switch_in;
  logic [2:0] sel = '0;
  logic       fi_enable = 1'b0, fi_input = 1'b0, fe_shift = 1'b0;
  logic [4:0] ch_enable, ch_input, ch_shift;
  int checks = 0, failures = 0;

  fi_switch_in #(.N_CHAINS(5), .SEL_W(3)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic [4:0] onehot;
      sel = 3'(i % 8);
      {fi_enable, fi_input, fe_shift} = 3'($urandom);
      #1;
      onehot = (sel < 5) ? 5'(1 << sel) : 5'b0;
      checks++;
      if (ch_enable !== (fi_enable ? onehot : 5'b0) ||
          ch_input  !== (fi_input  ? onehot : 5'b0) ||
          ch_shift  !== (fe_shift  ? onehot : 5'b0)) begin
        failures++;
        $display("FAIL sel=%0d en=%b in=%b sh=%b -> %b %b %b", sel, fi_enable, fi_input, fe_shift,
                 ch_enable, ch_input, ch_shift);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
