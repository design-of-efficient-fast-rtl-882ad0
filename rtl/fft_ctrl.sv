// fft_ctrl -- schedule controller of the folded 8-point FFT.
//
// A modulo-8 counter, phase, holds the folding time of the sample now on the
// input: x(n) of a frame arrives at phase n. The folding sets fix what each
// unit does at each phase:
//   A = {-, -, -, -, A0, A1, A2, A3}   BF I works at phases 4..7, twiddle W8^(phase-4)
//   B = {B2, B3, -, -, -, -, B0, B1}   BF II rotates by -j at odd phases (B1, B3)
//   C = {C1, C2, C3, -, -, -, -, C0}   BF III delivers X0/X4, X2/X6, X1/X5, X3/X7
//                                      at phases 7, 0, 1, 2
// The DEPTH=2 switch swaps at phases 2,3,6,7 (phase bit 1), the DEPTH=1
// switch at odd phases (phase bit 0). All outputs are decoded from the
// counter in the same cycle. out_ok says that BF III holds a result of a
// complete frame: at phase 7 always, at phases 0..2 once one frame has been
// fully received since reset. The counter advances only when en is 1 and is
// cleared by the active-low synchronous reset, so the first enabled sample
// after reset is x(0). The counter and the enable are this implementation's
// way of realising the schedule; the schedule itself is the published one.
module fft_ctrl
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  output logic [2:0] phase,
  output logic [1:0] tw_k,
  output logic       sw2_swap,
  output logic       bf2_rot_j,
  output logic       sw3_swap,
  output logic       out_ok,
  output logic [1:0] out_bin
);

  logic primed_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase    <= '0;
      primed_q <= 1'b0;
    end else if (en) begin
      phase <= phase + 3'd1;
      if (phase == 3'(N - 1)) primed_q <= 1'b1;
    end
  end

  always_comb begin
    tw_k      = phase[1:0];
    sw2_swap = phase[1];
    bf2_rot_j = phase[0];
    sw3_swap = phase[0];
    out_ok    = (phase == 3'd7) || (primed_q && phase <= 3'd2);
    unique case (phase)
      3'd7:    out_bin = 2'd0;
      3'd0:    out_bin = 2'd2;
      3'd1:    out_bin = 2'd1;
      3'd2:    out_bin = 2'd3;
      default: out_bin = 2'd0;
    endcase
  end

  // the schedule only moves on enabled cycles
  assert property (@(posedge clk) disable iff (!rst_n) !en |=> $stable(phase))
    else $error("fft_ctrl: phase moved while en was low");

endmodule
