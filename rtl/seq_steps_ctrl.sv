// seq_steps_ctrl: Sequence Steps Control of the fault sequence generator.
//
// Limits how many bit upsets one fault sequence may carry. While a sequence is
// sent (step high), it counts the ones that pass; once the count equals the
// configured limit, mask goes high and the output mux of the generator sends 0
// instead of the random bit, so the remaining elements of the chain receive no
// upset. arm clears the count at the start of each sequence. The counting of
// ones against a limit is this design's reading of the "masking logic to
// control the steps count"; the source gives only the block and its purpose.
//
// Timing: mask is combinational from the count; the count updates on the
// rising clock edge.
module seq_steps_ctrl #(
  parameter int unsigned CNT_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             arm,     // clear the count (new sequence)
  input  logic             step,    // one bit is being sent this clock
  input  logic             bit_in,  // the random bit being sent
  input  logic [CNT_W-1:0] limit,   // maximum number of ones to send
  output logic             mask     // 1: send 0 instead of bit_in
);

  logic [CNT_W-1:0] count;

  assign mask = (count >= limit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          count <= '0;
    else if (arm)                        count <= '0;
    else if (step && bit_in && !mask)    count <= count + 1'b1;
  end

endmodule
