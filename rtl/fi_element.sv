// fi_element: one fault injection element.
//
// A flip-flop that is one stage of the serial fault injection chain, and a mux
// on one net of the target circuit. The flip-flop takes scan_in when fe_shift
// is high and passes its value on through scan_out. When FI Enable is high and
// the stored bit is 1, the mux sends the inverted net (a bit flip); otherwise
// the net passes unchanged. The net's own driver and any flip-flop behind it
// are not touched, so removing FI Enable restores the circuit at once.
//
// The flip-flop, the AND of FI Enable with the stored bit and the two-input mux
// with the inverted net on input 1 follow the source description. The source
// clocks the chain with a separate FE Clock; here it runs on the system clock
// with fe_shift as a clock enable, and reset clears the stored bit.
//
// Timing: scan_out updates on the rising edge when fe_shift is high; sig_out is
// combinational.
module fi_element (
  input  logic clk,
  input  logic rst_n,
  input  logic fe_shift,   // FE Clock as a shift enable
  input  logic fi_enable,  // FI Enable
  input  logic scan_in,    // D: FI Input or previous element's Q
  output logic scan_out,   // Q
  input  logic sig_in,     // net from its driver
  output logic sig_out     // net towards its loads
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        scan_out <= 1'b0;
    else if (fe_shift) scan_out <= scan_in;
  end

  assign sig_out = (fi_enable && scan_out) ? ~sig_in : sig_in;

endmodule
