// delay_line -- DEPTH-stage shift register for complex samples.
//
// Used as the 4D input delay unit in front of butterfly unit I: with DEPTH=4
// the output in a cycle is the sample that entered four enabled cycles
// earlier, so x(n) leaves the delay exactly when x(n+4) arrives at the input
// and the butterfly sees the pair (x(n), x(n+4)). The register chain shifts
// only in cycles where en is 1; that lets the whole FFT pipeline stall as a
// unit (a choice of this implementation, the published design always runs).
// Reset clears all stages to zero.
module delay_line
  import fft_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  cplx_t din,
  output cplx_t dout
);

  cplx_t stage_q [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage_q[i] <= '0;
    end else if (en) begin
      stage_q[0] <= din;
      for (int i = 1; i < DEPTH; i++) stage_q[i] <= stage_q[i-1];
    end
  end

  assign dout = stage_q[DEPTH-1];

endmodule
