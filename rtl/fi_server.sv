// fi_server: Fault Injection Server (FSI), the controller of FISH.
//
// One injection, started by a one-clock start pulse in IDLE, runs through:
//   INIT      10 clocks. Clocks 0-7 step the four LFSRs: with cfg.reseed they
//             take their seeds serially, MSB first (Init En high), otherwise
//             they advance eight feedback steps so every bit of the word is
//             new. Clock 8 captures the 32-bit word and loads the chosen byte
//             into the serializer; clock 9 clears the step count.
//   WRITE     CHAIN_LEN clocks (8). The masked sequence is shifted into the
//             chain named by cfg.chain_sel (FE Clock active).
//   INJECT    cfg.inject_cycles clocks (at least 1) with FI Enable high: each
//             net whose element holds a 1 is inverted.
//   READBACK  CHAIN_LEN clocks. The chain is shifted with 0 at its input; what
//             leaves it enters the SIPO, and the chain ends up empty.
//   CLASSIFY  1 clock. The ones in the SIPO word are counted and the fault is
//             classed as none, single-bit or multi-bit; done pulses.
// INIT plus WRITE is 18 clocks, the injection time the source gives (10 clocks
// of initialisation and 8 of write for eight FI elements): FI Enable rises
// 18 clocks after INIT begins. The read-back through a
// SIPO and the classification by the number of ones follow the source too.
// What the 10 INIT clocks do, the INJECT length, the READBACK that also clears
// the chain, and the three fault classes are this design's choices.
//
// The configuration is latched at start and held for the whole injection.
// The sequence generator (fi_seq_gen) is inside; chains, switch logic and
// SIPO are outside and reached through the ports below.
module fi_server
  import fish_pkg::phase_e, fish_pkg::PH_IDLE, fish_pkg::PH_INIT, fish_pkg::PH_WRITE,
         fish_pkg::PH_INJECT, fish_pkg::PH_READBACK, fish_pkg::PH_CLASSIFY,
         fish_pkg::fault_class_e, fish_pkg::FC_NONE, fish_pkg::FC_SBU, fish_pkg::FC_MBU,
         fish_pkg::fsi_cfg_t, fish_pkg::fsi_status_t,
         fish_pkg::LFSR_W, fish_pkg::N_LFSR, fish_pkg::WORD_W, fish_pkg::SEL_W;
#(
  parameter int unsigned CHAIN_LEN   = fish_pkg::CHAIN_LEN,
  parameter int unsigned N_CHAINS    = 5,
  parameter int unsigned INIT_CYCLES = fish_pkg::INIT_CYCLES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  fsi_cfg_t             cfg,
  input  logic                 start,
  output logic                 fi_enable,   // FI Enable
  output logic                 fi_input,    // FI Input
  output logic                 fe_shift,    // FE Clock, as a shift enable
  output logic [SEL_W-1:0]     chain_sel,   // FE Chain Select
  output logic                 sipo_shift,
  input  logic [CHAIN_LEN-1:0] sipo_data,   // n-bit read-back
  output fsi_status_t          status
);

  localparam int unsigned ONES_W = $clog2(CHAIN_LEN + 1);

  phase_e               phase;
  logic [7:0]           cnt;
  fsi_cfg_t             cfg_q;
  logic                 done;
  logic [CHAIN_LEN-1:0] readback;
  logic [ONES_W-1:0]    ones_q;
  fault_class_e         fclass;
  logic [15:0]          n_inj, n_mbu;
  logic [ONES_W-1:0]    ones_now;

  // Sequence generator controls, decoded from the phase and counter.
  logic                 lfsr_step, init_en, capture, arm, shift_out, gen_data;
  logic [N_LFSR-1:0]    seed_bits;
  logic [WORD_W-1:0]    word;

  always_comb begin
    lfsr_step = (phase == PH_INIT) && (cnt < 8'(LFSR_W));
    init_en   = lfsr_step && cfg_q.reseed;
    capture   = (phase == PH_INIT) && (cnt == 8'(INIT_CYCLES - 2));
    arm       = (phase == PH_INIT) && (cnt == 8'(INIT_CYCLES - 1));
    shift_out = (phase == PH_WRITE);
    for (int k = 0; k < N_LFSR; k++)
      seed_bits[k] = cfg_q.seeds[k][3'(LFSR_W - 1 - 32'(cnt[2:0]))];
  end

  fi_seq_gen #(.SEQ_LEN(LFSR_W)) u_gen (
    .clk         (clk),
    .rst_n       (rst_n),
    .lfsr_step   (lfsr_step),
    .init_en     (init_en),
    .seed_bits   (seed_bits),
    .taps        (cfg_q.taps),
    .capture     (capture),
    .lane        (cfg_q.lane),
    .arm         (arm),
    .upset_limit (cfg_q.upset_limit),
    .shift_out   (shift_out),
    .fi_data     (gen_data),
    .word        (word)
  );

  assign fi_input   = (phase == PH_WRITE) ? gen_data : 1'b0;
  assign fe_shift   = (phase == PH_WRITE) || (phase == PH_READBACK);
  assign fi_enable  = (phase == PH_INJECT);
  assign sipo_shift = (phase == PH_READBACK);
  assign chain_sel  = cfg_q.chain_sel;

  always_comb begin
    ones_now = '0;
    for (int j = 0; j < CHAIN_LEN; j++) ones_now += ONES_W'(sipo_data[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_IDLE;
      cnt      <= '0;
      cfg_q    <= '0;
      done     <= 1'b0;
      readback <= '0;
      ones_q   <= '0;
      fclass   <= FC_NONE;
      n_inj    <= '0;
      n_mbu    <= '0;
    end else begin
      done <= 1'b0;
      cnt  <= cnt + 1'b1;
      unique case (phase)
        PH_IDLE: begin
          cnt <= '0;
          if (start) begin
            cfg_q <= cfg;
            phase <= PH_INIT;
          end
        end
        PH_INIT: if (cnt == 8'(INIT_CYCLES - 1)) begin
          cnt   <= '0;
          phase <= PH_WRITE;
        end
        PH_WRITE: if (cnt == 8'(CHAIN_LEN - 1)) begin
          cnt   <= '0;
          phase <= PH_INJECT;
        end
        PH_INJECT: if (cnt + 1'b1 >= cfg_q.inject_cycles) begin
          cnt   <= '0;
          phase <= PH_READBACK;
        end
        PH_READBACK: if (cnt == 8'(CHAIN_LEN - 1)) begin
          cnt   <= '0;
          phase <= PH_CLASSIFY;
        end
        PH_CLASSIFY: begin
          readback <= sipo_data;
          ones_q   <= ones_now;
          fclass   <= (ones_now == 0) ? FC_NONE : (ones_now == 1) ? FC_SBU : FC_MBU;
          n_inj    <= n_inj + 1'b1;
          if (ones_now > 1) n_mbu <= n_mbu + 1'b1;
          done     <= 1'b1;
          cnt      <= '0;
          phase    <= PH_IDLE;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    status.phase        = phase;
    status.busy         = (phase != PH_IDLE);
    status.done         = done;
    status.readback     = readback;
    status.ones         = ones_q;
    status.fclass       = fclass;
    status.word         = word;
    status.n_injections = n_inj;
    status.n_mbu        = n_mbu;
  end

  // A chain must not shift while it injects, and a start must name a chain.
  a_no_shift_while_inject: assert property (@(posedge clk) disable iff (!rst_n)
    !(fi_enable && fe_shift));
  a_valid_chain: assert property (@(posedge clk) disable iff (!rst_n)
    (start && phase == PH_IDLE) |-> (32'(cfg.chain_sel) < N_CHAINS));

endmodule
