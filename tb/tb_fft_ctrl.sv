// tb_fft_ctrl -- checks the schedule controller against the folding sets
// A = {-,-,-,-,A0,A1,A2,A3}, B = {B2,B3,-,-,-,-,B0,B1}, C = {C1,C2,C3,-,-,-,-,C0}
// written out here as per-phase tables: twiddle index of the active A node,
// swap of the 2-deep and 1-deep stages, -j rotation of the active B node, and
// which C node (and so which output bins) is active. The enable is random;
// the phase must advance only on enabled cycles, and out_ok must stay low at
// phases 0..2 until the first frame has been received.
module tb_fft_ctrl;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [2:0] phase;
  logic [1:0] out_bin;
  logic [1:0] tw_k;
  logic sw2_swap, bf2_rot_j, sw3_swap, out_ok;
  int checks = 0, failures = 0;

  fft_ctrl dut (.*);

  always #5 clk = ~clk;

  // per phase 0..7
  const int A_K[8]    = '{-1, -1, -1, -1, 0, 1, 2, 3};   // A node index (twiddle W8^k)
  const int B_NODE[8] = '{2, 3, -1, -1, -1, -1, 0, 1};   // B node index
  const int C_NODE[8] = '{1, 2, 3, -1, -1, -1, -1, 0};   // C node index
  const int C_BIN[4]  = '{0, 2, 1, 3};                   // upper output bin of C0..C3
  const bit SW2[8]    = '{0, 0, 1, 1, 0, 0, 1, 1};
  const bit SW3[8]    = '{0, 1, 0, 1, 0, 1, 0, 1};

  int exp_phase = 0;
  bit frame_seen = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 600; i++) begin
      en <= (i < 20) ? 1'b1 : ($urandom_range(0, 3) != 0);
      @(negedge clk);
      checks++;
      if (int'(phase) != exp_phase) begin
        failures++;
        $display("FAIL cycle %0d: phase %0d expected %0d", i, phase, exp_phase);
      end
      if (A_K[exp_phase] >= 0 && int'(tw_k) != A_K[exp_phase]) begin
        failures++;
        $display("FAIL phase %0d: tw_k %0d expected %0d", exp_phase, tw_k, A_K[exp_phase]);
      end
      if (B_NODE[exp_phase] >= 0 && bf2_rot_j != B_NODE[exp_phase][0]) begin
        failures++;
        $display("FAIL phase %0d: rot_j %0d for node B%0d", exp_phase, bf2_rot_j, B_NODE[exp_phase]);
      end
      if (sw2_swap != SW2[exp_phase] || sw3_swap != SW3[exp_phase]) begin
        failures++;
        $display("FAIL phase %0d: swaps %0d/%0d", exp_phase, sw2_swap, sw3_swap);
      end
      if (out_ok != (C_NODE[exp_phase] >= 0 && (exp_phase == 7 || frame_seen))) begin
        failures++;
        $display("FAIL phase %0d: out_ok %0d (frame seen %0d)", exp_phase, out_ok, frame_seen);
      end
      if (C_NODE[exp_phase] >= 0 && int'(out_bin) != C_BIN[C_NODE[exp_phase]]) begin
        failures++;
        $display("FAIL phase %0d: out_bin %0d expected %0d", exp_phase, out_bin, C_BIN[C_NODE[exp_phase]]);
      end
      @(posedge clk);
      if (en) begin
        if (exp_phase == 7) frame_seen = 1;
        exp_phase = (exp_phase + 1) % 8;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
