// fft8_folded -- pipelined folded 8-point radix-2 decimation-in-frequency FFT.
//
// The twelve butterflies of the 8-point DIF flow graph (three columns of
// four) are folded onto three butterfly units, one per column, each busy
// four of every eight cycles. Samples enter one per cycle in natural order,
// x(0) first; results leave two per cycle in bit-reversed pairs.
//
//   x --+--[4D]--a  BF I  sum --------> top  stage-2    top  BF II sum ----> top  stage-3   top  BF III --> y1
//       +--------b (W8^k) diff*W -----> bot  R1..R4,    bot  (-j)  diff*W -> bot  1D + mux  bot          --> y2
//                                           2 muxes
//
// Timing, counting the enabled cycle in which x(0) is on the input as 0:
// BF I works at 4..7 on (x(k), x(k+4)); BF II at 6,7,8,9 on (y0,y2),
// (y1,y3), (y4,y6), (y5,y7); BF III at 7,8,9,10 producing (X0,X4), (X2,X6),
// (X1,X5), (X3,X7). The outputs are registered, so each pair appears on
// y1/y2 one clock later, with out_valid high and out_bin naming the bin on
// y1 (y2 carries bin out_bin+4). Frames follow one another with no gap:
// the design accepts a new sample every cycle and delivers a full 8-point
// transform every 8 cycles, with a latency of 8 cycles from x(7) to X3/X7.
//
// Interface: start is a run / sample-valid input; while it is 0 every
// register holds, so the input stream may pause anywhere (this stall and
// the synchronous active-low reset rst_n are this implementation's
// choices). Inputs are IN_W-bit signed integers; outputs are OUT_W-bit
// signed with FRAC fractional bits (value = word / 2^FRAC) and saturate at
// the ends of their range. Word widths, the folding schedule, the register
// count (4 + 4 + 2 complex registers) and the output pairing follow the
// published design; the fraction width, saturation, out_valid and out_bin
// are added here.
module fft8_folded
  import fft_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [IN_W-1:0]  xr,
  input  logic signed [IN_W-1:0]  xi,
  output logic signed [OUT_W-1:0] y1r,
  output logic signed [OUT_W-1:0] y1i,
  output logic signed [OUT_W-1:0] y2r,
  output logic signed [OUT_W-1:0] y2i,
  output logic                    out_valid,
  output logic [1:0]              out_bin
);

  // ---------------------------------------------------------------- control
  logic [1:0] tw_k;
  logic       sw2_swap, bf2_rot_j, sw3_swap, out_ok;
  logic [1:0] bin_c;

  fft_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .en(start),
    .phase(), .tw_k(tw_k), .sw2_swap(sw2_swap), .bf2_rot_j(bf2_rot_j),
    .sw3_swap(sw3_swap), .out_ok(out_ok), .out_bin(bin_c)
  );

  // ------------------------------------------------------- input, 4D, BF I
  cplx_t x_in, x_dly, y_top, y_bot;

  always_comb begin
    x_in.re = data_t'(xr) <<< FRAC;
    x_in.im = data_t'(xi) <<< FRAC;
  end

  delay_line #(.DEPTH(4)) u_delay4 (
    .clk(clk), .rst_n(rst_n), .en(start), .din(x_in), .dout(x_dly)
  );

  bf_stage1 u_bf1 (.a(x_dly), .b(x_in), .k(tw_k), .sum(y_top), .diff_w(y_bot));

  // ------------------------------------------ stage-2 registers, BF II
  cplx_t b_top, b_bot, z_top, z_bot;

  commutator #(.DEPTH(2)) u_sw2 (
    .clk(clk), .rst_n(rst_n), .en(start), .swap(sw2_swap),
    .top_in(y_top), .bot_in(y_bot), .top_out(b_top), .bot_out(b_bot)
  );

  bf_stage2 u_bf2 (.a(b_top), .b(b_bot), .rot_j(bf2_rot_j), .sum(z_top), .diff_w(z_bot));

  // ------------------------------------------------ stage-3 1D, BF III
  cplx_t c_top, c_bot, x_lo, x_hi;

  commutator #(.DEPTH(1)) u_sw3 (
    .clk(clk), .rst_n(rst_n), .en(start), .swap(sw3_swap),
    .top_in(z_top), .bot_in(z_bot), .top_out(c_top), .bot_out(c_bot)
  );

  butterfly_r2 u_bf3 (.a(c_top), .b(c_bot), .sum(x_lo), .diff(x_hi));

  // ---------------------------------------------- saturating output register
  localparam data_t SAT_MAX = data_t'(2 ** (OUT_W - 1) - 1);
  localparam data_t SAT_MIN = data_t'(-(2 ** (OUT_W - 1)));

  function automatic logic signed [OUT_W-1:0] sat(data_t v);
    if (v > SAT_MAX)      return {1'b0, {(OUT_W-1){1'b1}}};
    else if (v < SAT_MIN) return {1'b1, {(OUT_W-1){1'b0}}};
    else                  return v[OUT_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y1r       <= '0;
      y1i       <= '0;
      y2r       <= '0;
      y2i       <= '0;
      out_valid <= 1'b0;
      out_bin   <= '0;
    end else begin
      out_valid <= start && out_ok;
      if (start && out_ok) begin
        y1r     <= sat(x_lo.re);
        y1i     <= sat(x_lo.im);
        y2r     <= sat(x_hi.re);
        y2i     <= sat(x_hi.im);
        out_bin <= bin_c;
      end
    end
  end

  // a result pair is only produced on an enabled cycle, one pair per cycle
  assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> $past(start))
    else $error("fft8_folded: out_valid without an enabled cycle");

endmodule
