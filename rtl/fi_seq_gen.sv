// fi_seq_gen: fault injection sequence generator.
//
// Four programmable 8-bit LFSRs run side by side and together form a 32-bit
// random word (word[8k+7:8k] is LFSR k, s7 in the top bit). On capture the word
// is stored and the byte chosen by lane is loaded into an 8-bit serializer.
// On each shift_out clock the serializer sends its top bit and moves up, so the
// byte leaves MSB first and, after 8 clocks, FI element j of the chain holds
// bit j. The Sequence Steps Control watches the bits sent and, once upset_limit
// ones have gone out, switches the output mux to the constant 0: the sequence
// then carries at most upset_limit upsets (limit 0 sends none, limit 8 or more
// sends the byte unchanged).
//
// From the source description: four 8-bit LFSRs with programmable taps and
// serial seeds, the 32-bit word, the step control driving a mux between the
// word's bit (input 0) and constant 0 (input 1). This design's choices: which
// byte reaches a chain (lane), the MSB-first order, and counting ones as the
// "steps".
//
// Timing: lfsr_step, capture, arm and shift_out act on the rising clock edge;
// fi_data is combinational from the serializer and the step count.
module fi_seq_gen
  import fish_pkg::*;
#(
  parameter int unsigned SEQ_LEN = LFSR_W   // bits per sequence (one LFSR byte)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          lfsr_step,   // advance every LFSR once
  input  logic                          init_en,     // Init En: LFSRs take seed bits
  input  logic [N_LFSR-1:0]             seed_bits,   // serial seed bit per LFSR
  input  logic [N_LFSR-1:0][7:1]        taps,        // r7..r1 per LFSR
  input  logic                          capture,     // store word, load serializer
  input  logic [1:0]                    lane,        // byte of the word to send
  input  logic                          arm,         // clear the step count
  input  logic [LIMIT_W-1:0]            upset_limit, // Step Size Control Configuration
  input  logic                          shift_out,   // send one bit
  output logic                          fi_data,     // FI Input Data
  output logic [WORD_W-1:0]             word         // captured 32-bit word
);

  logic [N_LFSR-1:0][LFSR_W-1:0] lfsr_state;
  logic [SEQ_LEN-1:0]            ser;
  logic                          mask;

  for (genvar k = 0; k < N_LFSR; k++) begin : g_lfsr
    logic unused_dout;
    prog_lfsr #(.W(LFSR_W)) u_lfsr (
      .clk     (clk),
      .rst_n   (rst_n),
      .step    (lfsr_step),
      .init_en (init_en),
      .seed_in (seed_bits[k]),
      .taps    (taps[k]),
      .state   (lfsr_state[k]),
      .dout    (unused_dout)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= '0;
      ser  <= '0;
    end else if (capture) begin
      word <= lfsr_state;
      ser  <= SEQ_LEN'(lfsr_state[lane]);
    end else if (shift_out) begin
      ser  <= {ser[SEQ_LEN-2:0], 1'b0};
    end
  end

  seq_steps_ctrl #(.CNT_W(LIMIT_W)) u_steps (
    .clk    (clk),
    .rst_n  (rst_n),
    .arm    (arm),
    .step   (shift_out),
    .bit_in (ser[SEQ_LEN-1]),
    .limit  (upset_limit),
    .mask   (mask)
  );

  // Output mux of Fig. 2: input 0 = word bit, input 1 = constant 0.
  assign fi_data = mask ? 1'b0 : ser[SEQ_LEN-1];

endmodule
