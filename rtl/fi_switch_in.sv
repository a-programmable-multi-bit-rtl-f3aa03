// fi_switch_in: switch logic in front of the fault injection chains.
//
// Routes the server's FI Enable, FI Input and FE Clock (shift enable) to the
// one chain named by FE Chain Select. Every other chain sees 0 on all three,
// so it neither shifts nor injects. A select past the last chain reaches no
// chain. The source names this block and its place; the demultiplexer inside
// is this design's choice.
//
// Timing: purely combinational.
module fi_switch_in #(
  parameter int unsigned N_CHAINS = 5,
  parameter int unsigned SEL_W    = 3
) (
  input  logic [SEL_W-1:0]    sel,
  input  logic                fi_enable,
  input  logic                fi_input,
  input  logic                fe_shift,
  output logic [N_CHAINS-1:0] ch_enable,
  output logic [N_CHAINS-1:0] ch_input,
  output logic [N_CHAINS-1:0] ch_shift
);

  always_comb begin
    for (int i = 0; i < N_CHAINS; i++) begin
      ch_enable[i] = (32'(sel) == i) && fi_enable;
      ch_input[i]  = (32'(sel) == i) && fi_input;
      ch_shift[i]  = (32'(sel) == i) && fe_shift;
    end
  end

endmodule
