// tgt_counter: 8-bit counter workload instrumented with a fault injection chain.
//
// An up-counter (wrapping, counting while en is high) whose eight output nets
// pass through the FI elements of one chain. The faults change what the
// counter's loads see, never the counter's own flip-flops, so the count is
// intact once FI Enable falls. The counter workload is named by the source;
// its width, the enable and where the elements sit are this design's choice.
//
// Timing: count updates on the rising edge; q is combinational from it.
module tgt_counter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fe_shift,
  input  logic       fi_enable,
  input  logic       scan_in,
  output logic       scan_out,
  input  logic       en,
  output logic [7:0] q
);

  logic [7:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  count <= '0;
    else if (en) count <= count + 1'b1;
  end

  fi_chain #(.CHAIN_LEN(8)) u_chain (
    .clk       (clk),
    .rst_n     (rst_n),
    .fe_shift  (fe_shift),
    .fi_enable (fi_enable),
    .scan_in   (scan_in),
    .scan_out  (scan_out),
    .sig_in    (count),
    .sig_out   (q)
  );

endmodule
