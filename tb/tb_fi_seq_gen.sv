// tb_fi_seq_gen: self-checking testbench for fi_seq_gen.
// Drives the generator the way the server does: 8 LFSR steps (seed load or
// free run), capture of the word with a lane, arm, then 8 bits sent. A
// reference keeps its own four LFSR states and, for each sequence, keeps only
// the first `limit` ones of the chosen byte, MSB first. Checks the captured
// 32-bit word and every bit sent.
module tb_fi_seq_gen;
  import fish_pkg::*;
  logic                   clk = 1'b0, rst_n = 1'b0;
  logic                   lfsr_step = 1'b0, init_en = 1'b0, capture = 1'b0, arm = 1'b0, shift_out = 1'b0;
  logic [3:0]             seed_bits = '0;
  logic [3:0][7:1]        taps = '0;
  logic [1:0]             lane = '0;
  logic [3:0]             upset_limit = '0;
  logic                   fi_data;
  logic [31:0]            word;
  int checks = 0, failures = 0;
  int n_masked = 0;

  fi_seq_gen #(.SEQ_LEN(8)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_next(logic [7:0] s, logic [7:1] r, logic ini, logic sd);
    return {s[6:0], ini ? sd : ^({r, 1'b0} & s)};
  endfunction

  function automatic logic [7:0] keep_ones(logic [7:0] b, int lim);
    logic [7:0] r = '0;
    int n = 0;
    for (int i = 7; i >= 0; i--) if (b[i] && n < lim) begin r[i] = 1'b1; n++; end
    return r;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0][7:0] model = '0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4; k++) taps[k] = (k == 0) ? 7'b1100000 : 7'($urandom) | 7'b1000000;
    for (int t = 0; t < 300; t++) begin
      logic       reseed;
      logic [3:0][7:0] seeds;
      logic [7:0] exp, got;
      reseed = (t % 25 == 0);
      for (int k = 0; k < 4; k++) seeds[k] = 8'($urandom_range(1, 255));
      for (int i = 7; i >= 0; i--) begin
        @(negedge clk);
        lfsr_step = 1'b1; init_en = reseed;
        for (int k = 0; k < 4; k++) begin
          seed_bits[k] = seeds[k][i];
          model[k] = ref_next(model[k], taps[k], reseed, seeds[k][i]);
        end
      end
      @(negedge clk); lfsr_step = 1'b0; init_en = 1'b0;
      lane = 2'($urandom); upset_limit = 4'($urandom_range(0, 9)); capture = 1'b1;
      @(negedge clk); capture = 1'b0; arm = 1'b1;
      checks++;
      if (word !== model) begin
        failures++;
        $display("FAIL word %h expected %h", word, model);
      end
      @(negedge clk); arm = 1'b0;
      exp = keep_ones(model[lane], int'(upset_limit));
      if (exp != model[lane]) n_masked++;
      for (int i = 7; i >= 0; i--) begin
        shift_out = 1'b1;
        #1 got[i] = fi_data;
        @(negedge clk);
      end
      shift_out = 1'b0;
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL t=%0d lane=%0d limit=%0d byte=%h sent=%h expected %h",
                 t, lane, upset_limit, model[lane], got, exp);
      end
    end
    checks++;
    if (n_masked == 0) begin failures++; $display("FAIL masking never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
