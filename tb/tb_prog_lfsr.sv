// tb_prog_lfsr: self-checking testbench for prog_lfsr.
// Loads seeds serially, then steps the register with the tap vectors of the
// feedback polynomials x^7+x^6+1 ... x^2+x+1 and with random taps, comparing
// the state every step with a reference that forms the feedback as the parity
// of (taps AND stages). Also checks the serial output, the hold when step is
// low, and one known sequence worked out by hand.
module tb_prog_lfsr;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       step = 1'b0, init_en = 1'b0, seed_in = 1'b0;
  logic [7:1] taps = '0;
  logic [7:0] state;
  logic       dout;
  int checks = 0, failures = 0;

  prog_lfsr #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_next(logic [7:0] s, logic [7:1] r, logic ini, logic sd);
    logic fb;
    fb = ^({r, 1'b0} & s);
    return {s[6:0], ini ? sd : fb};
  endfunction

  task automatic check(logic [7:0] exp, string what);
    checks++;
    if (state !== exp || dout !== exp[7]) begin
      failures++;
      $display("FAIL %s: state=%h expected %h", what, state, exp);
    end
  endtask

  logic [7:0] model;
  logic [7:1] tap_tab [6] = '{7'b1100000, 7'b0110000, 7'b0010100, 7'b0001100, 7'b0000110, 7'b0000011};

  task automatic load_seed(logic [7:0] seed);
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk); step = 1'b1; init_en = 1'b1; seed_in = seed[i];
      @(posedge clk); #1;
    end
    @(negedge clk); step = 1'b0; init_en = 1'b0;
    model = seed;
    check(seed, "seed load");
  endtask

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
    #1 check(8'h00, "reset");

    // Hand-worked: seed 0x01, taps x^7+x^6+1 (r7, r6). s0 <- s7^s6.
    load_seed(8'h01);
    taps = 7'b1100000;
    begin
      logic [7:0] exp_seq [8] = '{8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h81, 8'h03};
      for (int i = 0; i < 8; i++) begin
        @(negedge clk); step = 1'b1; @(posedge clk); #1;
        check(exp_seq[i], "hand sequence");
      end
    end
    @(negedge clk); step = 1'b0;
    // Hold when step is low.
    repeat (3) @(posedge clk); #1 check(8'h03, "hold");

    for (int t = 0; t < 6 + 20; t++) begin
      logic [7:0] seed;
      seed = 8'($urandom_range(1, 255));
      load_seed(seed);
      taps = (t < 6) ? tap_tab[t] : 7'($urandom);
      for (int i = 0; i < 300; i++) begin
        @(negedge clk); step = ($urandom_range(0, 3) != 0);
        model = step ? ref_next(model, taps, 1'b0, 1'b0) : model;
        @(posedge clk); #1;
        check(model, "random steps");
      end
      @(negedge clk); step = 1'b0;
    end

    // A loaded seed of zero with any taps stays zero.
    load_seed(8'h00);
    taps = 7'h7f;
    @(negedge clk); step = 1'b1; repeat (5) @(posedge clk); #1 check(8'h00, "zero state");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
