// prog_lfsr: 8-bit linear feedback shift register with programmable taps.
//
// Stages s0..s7 shift one place towards s7 on every step; s7 is the serial
// output. The new s0 is chosen by init_en: the serial seed bit while a seed is
// being loaded, otherwise the feedback u = XOR over j=1..7 of (r_j AND s_j).
// Each tap r_j is the select of a mux that passes s_j or a constant 0 into the
// XOR chain, so a tap vector r7..r1 = 1100000 gives the feedback polynomial
// x^7 + x^6 + 1. This structure, the serial seed entry and the tap numbering
// follow the source description. The step enable and the reset to all zeros
// are this design's choices. A seed sent MSB first over 8 steps leaves s_j equal
// to seed bit j. An all-zero state with no seed stays zero.
//
// Timing: state updates on the rising clock edge when step is high.
module prog_lfsr #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,     // shift once
  input  logic         init_en,  // Init En: take seed_in instead of feedback
  input  logic         seed_in,  // Initialize Seed, serial
  input  logic [W-1:1] taps,     // r_{W-1}..r_1
  output logic [W-1:0] state,    // s_{W-1}..s_0
  output logic         dout      // Output = s_{W-1}
);

  logic u;

  // Feedback of Eq. 2: XOR of the tapped stages.
  always_comb begin
    u = 1'b0;
    for (int j = 1; j < W; j++) u ^= taps[j] & state[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= '0;
    else if (step) state <= {state[W-2:0], init_en ? seed_in : u};
  end

  assign dout = state[W-1];

endmodule
