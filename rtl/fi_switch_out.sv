// fi_switch_out: switch logic behind the fault injection chains.
//
// Passes the serial output of the chain named by FE Chain Select to the SIPO,
// and 0 for a select past the last chain. The source names this block and its
// place; the multiplexer inside is this design's choice.
//
// Timing: purely combinational.
module fi_switch_out #(
  parameter int unsigned N_CHAINS = 5,
  parameter int unsigned SEL_W    = 3
) (
  input  logic [SEL_W-1:0]    sel,
  input  logic [N_CHAINS-1:0] ch_out,
  output logic                dout
);

  always_comb begin
    dout = 1'b0;
    for (int i = 0; i < N_CHAINS; i++)
      if (32'(sel) == i) dout = ch_out[i];
  end

endmodule
