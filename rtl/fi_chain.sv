// fi_chain: a fault injection chain of CHAIN_LEN elements.
//
// The elements are linked scan_out to scan_in, element 0 nearest the chain's
// FI Input, so after CHAIN_LEN shifts element j holds the bit that entered
// CHAIN_LEN-1-j clocks before the last. Each element sits on one net:
// sig_out[j] is sig_in[j], inverted while FI Enable is high and element j
// holds a 1. scan_out is the last element's bit, which the read-back path
// takes to the SIPO. The chain of elements follows the source description;
// the chain length default of eight is its number.
//
// Timing: one shift per clock with fe_shift high; sig_out is combinational.
module fi_chain #(
  parameter int unsigned CHAIN_LEN = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 fe_shift,
  input  logic                 fi_enable,
  input  logic                 scan_in,
  output logic                 scan_out,
  input  logic [CHAIN_LEN-1:0] sig_in,
  output logic [CHAIN_LEN-1:0] sig_out
);

  logic [CHAIN_LEN:0] link;

  assign link[0] = scan_in;

  for (genvar j = 0; j < CHAIN_LEN; j++) begin : g_elem
    fi_element u_elem (
      .clk       (clk),
      .rst_n     (rst_n),
      .fe_shift  (fe_shift),
      .fi_enable (fi_enable),
      .scan_in   (link[j]),
      .scan_out  (link[j+1]),
      .sig_in    (sig_in[j]),
      .sig_out   (sig_out[j])
    );
  end

  assign scan_out = link[CHAIN_LEN];

endmodule
