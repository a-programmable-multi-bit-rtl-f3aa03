// tgt_adder4: 4-bit ripple-carry adder workload with fault injection elements
// on its interconnect.
//
// Eight FI elements form one chain and sit on the adder's internal nets, in
// ripple order: element 0 on s0, 1 on carry c1, 2 on s1, 3 on c2, 4 on s2,
// 5 on c3, 6 on s3, 7 on carry out. A fault on a carry is seen by the next
// full adder, so it can change the higher sum bits as well; this is injection
// on interconnect rather than on outputs only. The 4-bit adder workload is
// named by the source; the ripple structure and the element placement are
// this design's choice.
//
// Timing: purely combinational apart from the chain's shift register.
module tgt_adder4 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fe_shift,
  input  logic       fi_enable,
  input  logic       scan_in,
  output logic       scan_out,
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [4:0] s     // {carry out, sum}
);

  logic [8:0] link;

  assign link[0] = scan_in;

  // Each full adder keeps its own scalar carry nets, so the carry path stays
  // a chain of separate signals.
  for (genvar i = 0; i < 4; i++) begin : g_fa
    logic cin;     // carry into this bit, after the previous FI element
    logic sum;
    logic cout;    // carry out of this bit, before its FI element
    logic cout_f;  // carry out of this bit, after its FI element

    if (i == 0) begin : g_c0
      assign cin = 1'b0;
    end else begin : g_cn
      assign cin = g_fa[i-1].cout_f;
    end

    assign sum  = a[i] ^ b[i] ^ cin;
    assign cout = (a[i] & b[i]) | (cin & (a[i] ^ b[i]));

    fi_element u_fi_s (
      .clk       (clk),
      .rst_n     (rst_n),
      .fe_shift  (fe_shift),
      .fi_enable (fi_enable),
      .scan_in   (link[2*i]),
      .scan_out  (link[2*i+1]),
      .sig_in    (sum),
      .sig_out   (s[i])
    );
    fi_element u_fi_c (
      .clk       (clk),
      .rst_n     (rst_n),
      .fe_shift  (fe_shift),
      .fi_enable (fi_enable),
      .scan_in   (link[2*i+1]),
      .scan_out  (link[2*i+2]),
      .sig_in    (cout),
      .sig_out   (cout_f)
    );
  end

  assign s[4]     = g_fa[3].cout_f;
  assign scan_out = link[8];

endmodule
