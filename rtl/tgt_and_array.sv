// tgt_and_array: eight AND gates instrumented with a fault injection chain.
//
// c[i] = a[i] & b[i]; each gate output passes through FI element i on its way
// out, so a 1 in element i inverts c[i] while FI Enable is high. This is the
// arrangement of FI elements at AND gate outputs shown for the fault injection
// chain in the source; the count of eight gates matches its eight FI elements.
//
// Timing: c is combinational; the chain shifts on the rising clock edge.
module tgt_and_array (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fe_shift,
  input  logic       fi_enable,
  input  logic       scan_in,
  output logic       scan_out,
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] c
);

  fi_chain #(.CHAIN_LEN(8)) u_chain (
    .clk       (clk),
    .rst_n     (rst_n),
    .fe_shift  (fe_shift),
    .fi_enable (fi_enable),
    .scan_in   (scan_in),
    .scan_out  (scan_out),
    .sig_in    (a & b),
    .sig_out   (c)
  );

endmodule
