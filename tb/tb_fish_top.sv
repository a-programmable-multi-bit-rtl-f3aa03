// tb_fish_top: end-to-end testbench for fish_top at its default sizes.
//
// Runs a series of injections through the whole design. Each picks a chain
// (target circuit), a lane, an upset limit, an FI Enable length and whether to
// reseed the LFSRs. Every clock the testbench applies fresh random operands
// to all five targets and checks every target output against a reference of
// the fault-free circuit, with the expected fault pattern applied only to the
// selected target and only during the INJECT phase. The expected pattern comes
// from a reference model of the four LFSRs and of the upset limit. After each
// injection it checks the read-back, ones count, class and counters, and it
// checks that the first FI Enable clock comes 18 clocks after INIT begins.
// It counts how often each mechanism happened (reseed, free-running advance,
// masking by the upset limit, exact 1/2/3/4-bit upsets, no-fault / single /
// multi-bit classes, injection into each chain, a carry fault rippling into
// higher adder bits, FI Enable held several clocks) and fails if one never did.
module tb_fish_top;
  import fish_pkg::*;
  logic            clk = 1'b0, rst_n = 1'b0;
  fsi_cfg_t        cfg;
  logic            start = 1'b0;
  fsi_status_t     status;
  logic [7:0]      and_a = '0, and_b = '0, and_c;
  logic            cnt_en = 1'b0;
  logic [7:0]      cnt_q;
  logic [3:0][1:0] sort_in = '0, sort_out;
  logic [3:0]      add_a = '0, add_b = '0, mul_a = '0, mul_b = '0;
  logic [4:0]      add_s;
  logic [7:0]      mul_p;
  int checks = 0, failures = 0;

  fish_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference models ----------------
  function automatic logic [7:0] ref_next(logic [7:0] s, logic [7:1] r, logic ini, logic sd);
    return {s[6:0], ini ? sd : ^({r, 1'b0} & s)};
  endfunction

  function automatic logic [7:0] keep_ones(logic [7:0] b, int lim);
    logic [7:0] r = '0;
    int n = 0;
    for (int i = 7; i >= 0; i--) if (b[i] && n < lim) begin r[i] = 1'b1; n++; end
    return r;
  endfunction

  function automatic logic [4:0] ref_add(logic [3:0] a, logic [3:0] b, logic [7:0] m);
    logic [4:0] s;
    logic cy = 1'b0;
    for (int i = 0; i < 4; i++) begin
      int tot;
      tot = int'(a[i]) + int'(b[i]) + int'(cy);
      s[i] = tot[0] ^ m[2*i];
      cy = tot[1] ^ m[2*i+1];
    end
    s[4] = cy;
    return s;
  endfunction

  function automatic logic [7:0] ref_sort(logic [3:0][1:0] d);
    int v [4];
    logic [7:0] r;
    for (int i = 0; i < 4; i++) v[i] = int'(d[i]);
    v.sort();
    for (int i = 0; i < 4; i++) r[2*i +: 2] = 2'(v[i]);
    return r;
  endfunction

  logic [7:0] cnt_model = '0;
  always @(posedge clk) if (rst_n && cnt_en) cnt_model <= cnt_model + 8'h01;

  int n_reseed = 0, n_advance = 0, n_masked = 0, n_none = 0, n_sbu = 0, n_mbu = 0;
  int n_exact [1:4] = '{0, 0, 0, 0};
  int n_chain [5] = '{0, 0, 0, 0, 0};
  int n_carry_ripple = 0, n_long_enable = 0;

  task automatic cmp(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (phase %s)", what, got, exp, status.phase.name());
    end
  endtask

  // Apply random operands and check all five targets for fault pattern m on chain sel.
  task automatic check_targets(int sel, logic [7:0] m);
    logic [7:0] f [5];
    for (int c = 0; c < 5; c++) f[c] = (c == sel) ? m : 8'h00;
    and_a = 8'($urandom); and_b = 8'($urandom); cnt_en = 1'($urandom);
    sort_in = 8'($urandom); add_a = 4'($urandom); add_b = 4'($urandom);
    mul_a = 4'($urandom); mul_b = 4'($urandom);
    #1;
    cmp(int'(and_c), int'((and_a & and_b) ^ f[0]), "AND array");
    cmp(int'(cnt_q), int'(cnt_model ^ f[1]), "counter");
    cmp(int'(sort_out), int'(ref_sort(sort_in) ^ f[2]), "bubble sort");
    cmp(int'(add_s), int'(ref_add(add_a, add_b, f[3])), "adder");
    cmp(int'(mul_p), int'(8'(int'(mul_a) * int'(mul_b)) ^ f[4]), "multiplier");
    if (f[3] != 0) begin
      // A carry fault changes more than the flipped sum bits.
      logic [4:0] sum_only;
      sum_only = 5'(add_a + add_b) ^ {1'b0, f[3][6], f[3][4], f[3][2], f[3][0]};
      if (ref_add(add_a, add_b, f[3]) != sum_only) n_carry_ripple++;
    end
  endtask

  logic [3:0][7:0] model = '0;

  initial begin
    int n_inj = 0, n_mb = 0;
    cfg = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 250; t++) begin
      logic [7:0] exp;
      int ones, first_inj, c_inj, inj_len;
      cfg.reseed = (t % 12 == 0);
      for (int k = 0; k < 4; k++) begin
        cfg.taps[k]  = (t < 12) ? 7'b1100000 : 7'($urandom) | 7'b1000000;
        cfg.seeds[k] = 8'($urandom_range(1, 255));
      end
      cfg.upset_limit   = (t < 20) ? 4'(1 + t % 4) : 4'($urandom_range(0, 9));
      cfg.lane          = 2'($urandom);
      cfg.chain_sel     = 3'(t % 5);
      cfg.inject_cycles = 8'($urandom_range(0, 4));
      for (int i = 7; i >= 0; i--)
        for (int k = 0; k < 4; k++) model[k] = ref_next(model[k], cfg.taps[k], cfg.reseed, cfg.seeds[k][i]);
      exp = keep_ones(model[cfg.lane], int'(cfg.upset_limit));
      ones = $countones(exp);
      inj_len = (cfg.inject_cycles == 0) ? 1 : int'(cfg.inject_cycles);
      start = 1'b1;
      check_targets(-1, 8'h00);      // idle clock: no faults anywhere
      @(negedge clk); start = 1'b0;
      first_inj = -1; c_inj = 0;
      for (int cyc = 0; !status.done && cyc < 400; cyc++) begin
        if (status.phase == PH_INJECT) begin
          if (first_inj < 0) first_inj = cyc;
          c_inj++;
          check_targets(int'(cfg.chain_sel), exp);
        end else begin
          check_targets(-1, 8'h00);
        end
        @(negedge clk);
      end
      cmp(first_inj, 18, "clocks from INIT to FI Enable");
      cmp(c_inj, inj_len, "FI Enable clocks");
      n_inj++;
      if (ones > 1) n_mb++;
      cmp(int'(status.readback), int'(exp), "read-back");
      cmp(int'(status.ones), ones, "ones");
      cmp(int'(status.fclass), (ones == 0) ? 0 : (ones == 1) ? 1 : 2, "class");
      cmp(int'(status.word), int'(model), "word");
      cmp(int'(status.n_injections), n_inj, "injections");
      cmp(int'(status.n_mbu), n_mb, "MBU count");
      // Mechanism counts.
      if (cfg.reseed) n_reseed++; else n_advance++;
      if (exp != model[cfg.lane]) n_masked++;
      if (ones >= 1 && ones <= 4 && ones == int'(cfg.upset_limit)) n_exact[ones]++;
      case (ones) 0: n_none++; 1: n_sbu++; default: n_mbu++; endcase
      if (ones > 0) n_chain[cfg.chain_sel]++;
      if (inj_len > 1) n_long_enable++;
    end
    $display("mechanisms: reseed=%0d advance=%0d masked=%0d none=%0d sbu=%0d mbu=%0d",
             n_reseed, n_advance, n_masked, n_none, n_sbu, n_mbu);
    $display("exact upsets 1..4: %0d %0d %0d %0d; faults per chain: %0d %0d %0d %0d %0d; carry ripple=%0d long enable=%0d",
             n_exact[1], n_exact[2], n_exact[3], n_exact[4], n_chain[0], n_chain[1], n_chain[2],
             n_chain[3], n_chain[4], n_carry_ripple, n_long_enable);
    begin
      int counts [];
      counts = '{n_reseed, n_advance, n_masked, n_none, n_sbu, n_mbu, n_exact[1], n_exact[2],
                 n_exact[3], n_exact[4], n_chain[0], n_chain[1], n_chain[2], n_chain[3], n_chain[4],
                 n_carry_ripple, n_long_enable};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
