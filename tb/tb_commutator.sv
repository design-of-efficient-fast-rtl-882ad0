// tb_commutator -- checks the delay/switch/delay reordering at DEPTH 2 (the
// R1..R4 stage between BF I and BF II) and DEPTH 1 (the 1D stage before
// BF III). Groups of 2*D labelled pairs stream in back to back, the switch
// swapping in the second half of each group. With s the position in a group,
// the pair out at s = D..2D-1 must be (top[s-D], top[s]) of the same group
// and the pair out D cycles later (bot[s-D], bot[s]); for D = 2 that turns
// (y0,y4),(y1,y5),(y2,y6),(y3,y7) into (y0,y2),(y1,y3),(y4,y6),(y5,y7).
// Random cycles with en low, carrying garbage, stall both units.
module tb_commutator;
  import fft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  cplx_t ti2 = '0, bi2 = '0, ti1 = '0, bi1 = '0;
  cplx_t to2, bo2, to1, bo1;
  int checks = 0, failures = 0;
  int t = 0;   // enabled cycles so far

  commutator #(.DEPTH(2)) dut2 (.clk(clk), .rst_n(rst_n), .en(en), .swap((t % 4) >= 2),
                                .top_in(ti2), .bot_in(bi2), .top_out(to2), .bot_out(bo2));
  commutator #(.DEPTH(1)) dut1 (.clk(clk), .rst_n(rst_n), .en(en), .swap((t % 2) >= 1),
                                .top_in(ti1), .bot_in(bi1), .top_out(to1), .bot_out(bo1));

  always #5 clk = ~clk;

  // label of group g, slot s, side 0 = top / 1 = bottom
  function automatic cplx_t lbl(int g, int s, int side);
    cplx_t v;
    v.re = data_t'(g * 16 + s * 2 + side);
    v.im = data_t'(-(g * 16 + s * 2 + side) - 1);
    return v;
  endfunction

  task automatic check_d(int d, cplx_t to, cplx_t bo);
    int g, s;
    cplx_t et, eb;
    g = t / (2 * d);
    s = t % (2 * d);
    if (t < 2 * d) return;
    if (s >= d) begin
      et = lbl(g, s - d, 0);
      eb = lbl(g, s, 0);
    end else begin
      et = lbl(g - 1, s, 1);
      eb = lbl(g - 1, s + d, 1);
    end
    checks++;
    if (to != et || bo != eb) begin
      failures++;
      $display("FAIL D=%0d t=%0d: out (%0d,%0d) expected (%0d,%0d)", d, t, to.re, bo.re, et.re, eb.re);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (t < 400) begin
      #1;
      if ($urandom_range(0, 4) == 0) begin
        en  <= 1'b0;
        ti2 <= '1; bi2 <= '1; ti1 <= '1; bi1 <= '1;
        @(posedge clk);
      end else begin
        en  <= 1'b1;
        ti2 <= lbl(t / 4, t % 4, 0);
        bi2 <= lbl(t / 4, t % 4, 1);
        ti1 <= lbl(t / 2, t % 2, 0);
        bi1 <= lbl(t / 2, t % 2, 1);
        @(negedge clk);
        check_d(2, to2, bo2);
        check_d(1, to1, bo1);
        @(posedge clk);
        t <= t + 1;
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
