// tb_fi_server: self-checking testbench for fi_server.
// A behavioural chain (8 stages) and SIPO are attached to the server's
// ports. For each injection the testbench checks the phase lengths (10 INIT
// clocks, 8 WRITE clocks, first INJECT clock 18 clocks after INIT began, the
// configured INJECT length, 8 READBACK clocks), that the chain holds the
// expected masked byte while FI Enable is high, and the read-back, ones
// count, class and counters reported at done. The expected byte comes from a
// reference model of the four LFSRs and of the upset limit.
module tb_fi_server;
  import fish_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  fsi_cfg_t    cfg;
  logic        start = 1'b0;
  logic        fi_enable, fi_input, fe_shift, sipo_shift;
  logic [2:0]  chain_sel;
  logic [7:0]  sipo_data;
  fsi_status_t status;
  int checks = 0, failures = 0;
  int n_reseed = 0, n_advance = 0, n_none = 0, n_sbu = 0, n_mbu = 0, n_masked = 0;

  fi_server #(.CHAIN_LEN(8), .N_CHAINS(5), .INIT_CYCLES(10)) dut (.*);

  always #5 clk = ~clk;

  // Behavioural chain and SIPO.
  logic [7:0] chain = '0, sipo_q = '0;
  always_ff @(posedge clk) begin
    if (fe_shift)   chain  <= {chain[6:0], fi_input};
    if (sipo_shift) sipo_q <= {sipo_q[6:0], chain[7]};
  end
  assign sipo_data = sipo_q;

  function automatic logic [7:0] ref_next(logic [7:0] s, logic [7:1] r, logic ini, logic sd);
    return {s[6:0], ini ? sd : ^({r, 1'b0} & s)};
  endfunction

  function automatic logic [7:0] keep_ones(logic [7:0] b, int lim);
    logic [7:0] r = '0;
    int n = 0;
    for (int i = 7; i >= 0; i--) if (b[i] && n < lim) begin r[i] = 1'b1; n++; end
    return r;
  endfunction

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0][7:0] model = '0;

  initial begin
    int n_inj = 0, n_mb = 0;
    cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 120; t++) begin
      logic [7:0] exp;
      int c_init, c_write, c_inj, c_rb, ones, inj_len, first_inj;
      @(negedge clk);
      cfg.reseed = (t % 10 == 0);
      for (int k = 0; k < 4; k++) begin
        cfg.taps[k]  = (t < 10) ? 7'b1100000 : 7'($urandom) | 7'b1000000;
        cfg.seeds[k] = 8'($urandom_range(1, 255));
      end
      cfg.upset_limit   = 4'($urandom_range(0, 8));
      cfg.lane          = 2'($urandom);
      cfg.chain_sel     = 3'($urandom_range(0, 4));
      cfg.inject_cycles = 8'($urandom_range(0, 5));
      if (cfg.reseed) n_reseed++; else n_advance++;
      for (int i = 7; i >= 0; i--)
        for (int k = 0; k < 4; k++) model[k] = ref_next(model[k], cfg.taps[k], cfg.reseed, cfg.seeds[k][i]);
      exp = keep_ones(model[cfg.lane], int'(cfg.upset_limit));
      if (exp != model[cfg.lane]) n_masked++;
      inj_len = (cfg.inject_cycles == 0) ? 1 : int'(cfg.inject_cycles);
      start = 1'b1;
      @(negedge clk); start = 1'b0;
      c_init = 0; c_write = 0; c_inj = 0; c_rb = 0; first_inj = -1;
      for (int cyc = 0; !status.done; cyc++) begin
        case (status.phase)
          PH_INIT:     c_init++;
          PH_WRITE:    c_write++;
          PH_INJECT: begin
            if (first_inj < 0) first_inj = cyc;
            c_inj++;
            checks++;
            if (!fi_enable || chain !== exp || chain_sel !== cfg.chain_sel) begin
              failures++;
              $display("FAIL t=%0d inject: en=%b chain=%h expected %h", t, fi_enable, chain, exp);
            end
          end
          PH_READBACK: c_rb++;
          default: ;
        endcase
        if (cyc > 400) break;
        @(negedge clk);
      end
      expect_eq(c_init, 10, "INIT clocks");
      expect_eq(c_write, 8, "WRITE clocks");
      expect_eq(first_inj, 18, "clocks before FI Enable");
      expect_eq(c_inj, inj_len, "INJECT clocks");
      expect_eq(c_rb, 8, "READBACK clocks");
      ones = $countones(exp);
      n_inj++;
      if (ones > 1) n_mb++;
      expect_eq(int'(status.readback), int'(exp), "read-back");
      expect_eq(int'(status.ones), ones, "ones");
      expect_eq(int'(status.fclass), (ones == 0) ? 0 : (ones == 1) ? 1 : 2, "class");
      expect_eq(int'(status.word), int'(model), "word");
      expect_eq(int'(status.n_injections), n_inj, "injection count");
      expect_eq(int'(status.n_mbu), n_mb, "MBU count");
      expect_eq(int'(chain), 0, "chain cleared");
      case (ones) 0: n_none++; 1: n_sbu++; default: n_mbu++; endcase
    end
    if (n_reseed == 0 || n_advance == 0 || n_none == 0 || n_sbu == 0 || n_mbu == 0 || n_masked == 0) begin
      failures++;
      $display("FAIL a mechanism never happened: reseed=%0d advance=%0d none=%0d sbu=%0d mbu=%0d masked=%0d",
               n_reseed, n_advance, n_none, n_sbu, n_mbu, n_masked);
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
