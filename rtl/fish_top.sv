// fish_top: FISH, a fault injection self-test hardware for multi-bit upsets.
//
// The Fault Injection Server (fi_server) turns a configuration into one
// injection: it draws a pseudo-random byte from four programmable LFSRs,
// limits it to the configured number of ones, shifts it into the fault
// injection chain chosen by cfg.chain_sel, raises FI Enable so that every net
// whose element holds a 1 is inverted, and then shifts the chain out through
// the SIPO to count and classify what was injected.
//
// Five chains of eight FI elements are wired in, each on the nets of one small
// target circuit:
//   chain 0  eight AND gates             (and_a, and_b -> and_c)
//   chain 1  8-bit counter               (cnt_en -> cnt_q)
//   chain 2  bubble sort of four 2-bit values (sort_in -> sort_out)
//   chain 3  4-bit ripple-carry adder    (add_a, add_b -> add_s)
//   chain 4  4x4 multiplier              (mul_a, mul_b -> mul_p)
// The switch logic sends FI Enable, FI Input and the shift enable to the
// chosen chain only, and returns that chain's serial output to the SIPO.
// The target outputs are correct except while the server is in its INJECT
// phase with a non-zero sequence in their chain.
//
// The server, switch logic, chains and SIPO follow the block diagram of the
// source; the count of chains and the five target circuits are this design's
// choice (the source names the counter, bubble sort, adder and multiplier as
// workloads and shows AND gates with FI elements).
//
// Timing: single clock, active-low asynchronous reset. See fi_server for the
// phase lengths (INIT 10 + WRITE 8 clocks before FI Enable).
module fish_top
  import fish_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  fsi_cfg_t        cfg,
  input  logic            start,
  output fsi_status_t     status,
  // chain 0: AND array
  input  logic [7:0]      and_a,
  input  logic [7:0]      and_b,
  output logic [7:0]      and_c,
  // chain 1: counter
  input  logic            cnt_en,
  output logic [7:0]      cnt_q,
  // chain 2: bubble sort
  input  logic [3:0][1:0] sort_in,
  output logic [3:0][1:0] sort_out,
  // chain 3: 4-bit adder
  input  logic [3:0]      add_a,
  input  logic [3:0]      add_b,
  output logic [4:0]      add_s,
  // chain 4: 4-bit multiplier
  input  logic [3:0]      mul_a,
  input  logic [3:0]      mul_b,
  output logic [7:0]      mul_p
);

  localparam int unsigned N_CHAINS = 5;  // one chain per target circuit

  logic                 fi_enable, fi_input, fe_shift, sipo_shift, sipo_din;
  logic [SEL_W-1:0]     chain_sel;
  logic [CHAIN_LEN-1:0] sipo_q;
  logic [N_CHAINS-1:0]  ch_enable, ch_input, ch_shift, ch_out;

  fi_server #(.N_CHAINS(N_CHAINS)) u_fsi (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg        (cfg),
    .start      (start),
    .fi_enable  (fi_enable),
    .fi_input   (fi_input),
    .fe_shift   (fe_shift),
    .chain_sel  (chain_sel),
    .sipo_shift (sipo_shift),
    .sipo_data  (sipo_q),
    .status     (status)
  );

  fi_switch_in #(.N_CHAINS(N_CHAINS), .SEL_W(SEL_W)) u_sw_in (
    .sel       (chain_sel),
    .fi_enable (fi_enable),
    .fi_input  (fi_input),
    .fe_shift  (fe_shift),
    .ch_enable (ch_enable),
    .ch_input  (ch_input),
    .ch_shift  (ch_shift)
  );

  tgt_and_array u_and (
    .clk(clk), .rst_n(rst_n), .fe_shift(ch_shift[0]), .fi_enable(ch_enable[0]),
    .scan_in(ch_input[0]), .scan_out(ch_out[0]),
    .a(and_a), .b(and_b), .c(and_c)
  );

  tgt_counter u_cnt (
    .clk(clk), .rst_n(rst_n), .fe_shift(ch_shift[1]), .fi_enable(ch_enable[1]),
    .scan_in(ch_input[1]), .scan_out(ch_out[1]),
    .en(cnt_en), .q(cnt_q)
  );

  tgt_bubble_sort u_sort (
    .clk(clk), .rst_n(rst_n), .fe_shift(ch_shift[2]), .fi_enable(ch_enable[2]),
    .scan_in(ch_input[2]), .scan_out(ch_out[2]),
    .din(sort_in), .dout(sort_out)
  );

  tgt_adder4 u_add (
    .clk(clk), .rst_n(rst_n), .fe_shift(ch_shift[3]), .fi_enable(ch_enable[3]),
    .scan_in(ch_input[3]), .scan_out(ch_out[3]),
    .a(add_a), .b(add_b), .s(add_s)
  );

  tgt_mult4 u_mul (
    .clk(clk), .rst_n(rst_n), .fe_shift(ch_shift[4]), .fi_enable(ch_enable[4]),
    .scan_in(ch_input[4]), .scan_out(ch_out[4]),
    .a(mul_a), .b(mul_b), .p(mul_p)
  );

  fi_switch_out #(.N_CHAINS(N_CHAINS), .SEL_W(SEL_W)) u_sw_out (
    .sel    (chain_sel),
    .ch_out (ch_out),
    .dout   (sipo_din)
  );

  sipo #(.N(CHAIN_LEN)) u_sipo (
    .clk   (clk),
    .rst_n (rst_n),
    .shift (sipo_shift),
    .din   (sipo_din),
    .q     (sipo_q)
  );

endmodule
