// sipo: serial-in parallel-out read-back register.
//
// Captures the bits that leave the selected fault injection chain so the
// server can see, as one n-bit word, which elements held a 1. Each shift moves
// the register up by one and puts din in bit 0. A chain of N elements shifted N
// times leaves q[j] equal to what element j held, because the last element
// leaves first. The register and its n-bit path to the server follow the source
// description; the width equal to the chain length and the shift direction are
// this design's choice.
//
// Timing: one shift per rising clock edge with shift high.
module sipo #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         din,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (shift) q <= {q[N-2:0], din};
  end

endmodule
