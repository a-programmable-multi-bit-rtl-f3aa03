// tgt_mult4: 4x4 unsigned multiplier workload with a fault injection chain.
//
// Forms the four shifted partial products a & b[i] and adds them row by row;
// the eight product bits pass through one chain of FI elements (element j on
// p[j]). The 4-bit multiplier workload is named by the source; the array form
// and where the elements sit are this design's choice.
//
// Timing: purely combinational apart from the chain's shift register.
module tgt_mult4 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fe_shift,
  input  logic       fi_enable,
  input  logic       scan_in,
  output logic       scan_out,
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [7:0] prod;

  always_comb begin
    prod = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) prod += 8'(a) << i;
  end

  fi_chain #(.CHAIN_LEN(8)) u_chain (
    .clk       (clk),
    .rst_n     (rst_n),
    .fe_shift  (fe_shift),
    .fi_enable (fi_enable),
    .scan_in   (scan_in),
    .scan_out  (scan_out),
    .sig_in    (prod),
    .sig_out   (p)
  );

endmodule
