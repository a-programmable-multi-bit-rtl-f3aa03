// tgt_bubble_sort: bubble-sort workload instrumented with a fault injection chain.
//
// Sorts four 2-bit values into ascending order (out[0] smallest) with the
// compare-exchange network of a bubble sort: three passes over adjacent pairs,
// (0,1)(1,2)(2,3), then (0,1)(1,2), then (0,1). The eight bits of the sorted
// result pass through one chain of FI elements, element 2*i+k on bit k of
// out[i]. The bubble-sort workload is named by the source; its size and the
// combinational form are this design's choice.
//
// Timing: purely combinational apart from the chain's shift register.
module tgt_bubble_sort (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            fe_shift,
  input  logic            fi_enable,
  input  logic            scan_in,
  output logic            scan_out,
  input  logic [3:0][1:0] din,
  output logic [3:0][1:0] dout
);

  logic [3:0][1:0] v;

  always_comb begin
    logic [1:0] t;
    t = 2'b00;
    v = din;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < 3 - pass; i++) begin
        if (v[i] > v[i+1]) begin
          t      = v[i];
          v[i]   = v[i+1];
          v[i+1] = t;
        end
      end
    end
  end

  fi_chain #(.CHAIN_LEN(8)) u_chain (
    .clk       (clk),
    .rst_n     (rst_n),
    .fe_shift  (fe_shift),
    .fi_enable (fi_enable),
    .scan_in   (scan_in),
    .scan_out  (scan_out),
    .sig_in    (v),
    .sig_out   (dout)
  );

endmodule
