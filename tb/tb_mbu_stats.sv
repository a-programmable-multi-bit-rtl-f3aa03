// tb_mbu_stats: fault-position statistics of the LFSR-based upset generator.
//
// Repeats the measurement behind the generator's occurrence table: the
// sequence generator runs N_SEQ sequences back to back, each preceded by eight
// free-running LFSR steps, with the feedback polynomial x^7 + x^6 + 1 (taps
// r7..r1 = 1100000) on every LFSR and an upset limit of one, so each sequence
// carries either no upset or a single bit flip. The testbench histograms which
// bit position of the byte was flipped (or none) and prints the percentages.
// A reference model of the LFSR and of the limit builds the same histogram
// independently; every sequence and the final histograms must agree.
// The seed (0x5A, 0xC3, 0x3C, 0x81) and N_SEQ are this testbench's choices.
module tb_mbu_stats;
  import fish_pkg::*;
  localparam int N_SEQ = 1000000;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            lfsr_step = 1'b0, init_en = 1'b0, capture = 1'b0, arm = 1'b0, shift_out = 1'b0;
  logic [3:0]      seed_bits = '0;
  logic [3:0][7:1] taps = {4{7'b1100000}};
  logic [1:0]      lane = 2'd0;
  logic [3:0]      upset_limit = 4'd1;
  logic            fi_data;
  logic [31:0]     word;
  int checks = 0, failures = 0;

  fi_seq_gen #(.SEQ_LEN(8)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_next(logic [7:0] s, logic [7:1] r, logic ini, logic sd);
    return {s[6:0], ini ? sd : ^({r, 1'b0} & s)};
  endfunction

  initial begin
    repeat (40 * N_SEQ) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0][7:0] seeds = {8'h81, 8'h3C, 8'hC3, 8'h5A};
    logic [3:0][7:0] model;
    int hist_dut [9];   // index 8 = no fault
    int hist_ref [9];
    int n_seq_bad = 0;
    for (int i = 0; i < 9; i++) begin hist_dut[i] = 0; hist_ref[i] = 0; end
    model = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Serial seed load.
    for (int i = 7; i >= 0; i--) begin
      lfsr_step = 1'b1; init_en = 1'b1;
      for (int k = 0; k < 4; k++) begin
        seed_bits[k] = seeds[k][i];
        model[k] = ref_next(model[k], taps[k], 1'b1, seeds[k][i]);
      end
      @(negedge clk);
    end
    init_en = 1'b0;
    for (int n = 0; n < N_SEQ; n++) begin
      logic [7:0] got;
      int pos_ref;
      lfsr_step = 1'b1;
      for (int i = 0; i < 8; i++) begin
        model[0] = ref_next(model[0], taps[0], 1'b0, 1'b0);
        @(negedge clk);
      end
      lfsr_step = 1'b0; capture = 1'b1;
      @(negedge clk); capture = 1'b0; arm = 1'b1;
      @(negedge clk); arm = 1'b0; shift_out = 1'b1;
      for (int i = 7; i >= 0; i--) begin
        #1 got[i] = fi_data;
        @(negedge clk);
      end
      shift_out = 1'b0;
      pos_ref = 8;
      for (int i = 0; i < 8; i++) if (model[0][i]) pos_ref = i;   // highest one survives
      if ($countones(got) > 1) n_seq_bad++;
      else if (got == 0) hist_dut[8]++;
      else for (int i = 0; i < 8; i++) if (got[i]) hist_dut[i]++;
      hist_ref[pos_ref]++;
      if ((pos_ref == 8 && got != 0) || (pos_ref < 8 && got != 8'(1 << pos_ref))) n_seq_bad++;
    end
    $display("sequences: %0d, limit 1 upset, polynomial x^7+x^6+1", N_SEQ);
    $display("  no fault        : %0d (%0.1f%%)", hist_dut[8], 100.0 * hist_dut[8] / N_SEQ);
    for (int i = 7; i >= 0; i--)
      $display("  fault at bit %0d : %0d (%0.1f%%)", i, hist_dut[i], 100.0 * hist_dut[i] / N_SEQ);
    checks++;
    if (n_seq_bad != 0) begin
      failures++;
      $display("FAIL %0d sequences differ from the reference", n_seq_bad);
    end
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (hist_dut[i] != hist_ref[i]) begin
        failures++;
        $display("FAIL histogram bin %0d: %0d expected %0d", i, hist_dut[i], hist_ref[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
