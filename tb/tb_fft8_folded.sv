// tb_fft8_folded -- end-to-end check of the folded 8-point FFT at its default sizes.
//
// Streams frames of eight complex 8-bit samples into the design and compares
// every output pair with a direct DFT, X(k) = sum x(n) exp(-j*2*pi*n*k/8),
// computed here in floating point, scaled by 2^FRAC and clipped to the 16-bit
// range (tolerance 2 LSB, the twiddle rounding of the first stage). Frames:
// the all-ones frame (X0 = 8, the rest 0), impulses at each position, small
// random frames, full-scale random frames and constant full-scale frames that
// must saturate. Runs are back to back, and some stretches hold start low at
// random points to stall the pipeline mid-frame. It checks the bit-reversed
// pair order (0/4, 2/6, 1/5, 3/7), the rate (a frame every 8 cycles when not
// stalled) and the latency (first pair one clock after x(7), last pair four
// clocks after x(7)), and counts how often each mechanism occurred: stalls,
// saturations, back-to-back frames and each of the four BF I twiddles
// carrying a nonzero difference.
module tb_fft8_folded;
  import fft_pkg::*;

  localparam int NFRAMES = 200;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic signed [IN_W-1:0] xr = '0, xi = '0;
  logic signed [OUT_W-1:0] y1r, y1i, y2r, y2i;
  logic out_valid;
  logic [1:0] out_bin;

  int checks = 0, failures = 0;
  int n_stall = 0, n_sat = 0, n_b2b = 0, n_frames_out = 0;
  int n_tw[4] = '{0, 0, 0, 0};
  longint cycle = 0;

  fft8_folded dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // frames to send and their expected spectra
  int fr_re[NFRAMES][8], fr_im[NFRAMES][8];
  int ex_re[NFRAMES][8], ex_im[NFRAMES][8];
  longint x7_cycle[NFRAMES];
  bit     stalled_in[NFRAMES];

  function automatic int sat16(real v);
    real r;
    r = (v >= 0.0) ? $floor(v + 0.5) : -$floor(-v + 0.5);
    if (r > 32767.0) return 32767;
    if (r < -32768.0) return -32768;
    return int'(r);
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic make_frames();
    for (int f = 0; f < NFRAMES; f++) begin
      for (int n = 0; n < 8; n++) begin
        if (f == 0) begin fr_re[f][n] = 1; fr_im[f][n] = 0; end
        else if (f <= 8) begin fr_re[f][n] = (n == f - 1) ? 100 : 0; fr_im[f][n] = (n == f - 1) ? -37 : 0; end
        else if (f == 9) begin fr_re[f][n] = 127; fr_im[f][n] = -128; end
        else if (f % 3 == 0) begin
          fr_re[f][n] = $signed($urandom_range(0, 255)) - 128;
          fr_im[f][n] = $signed($urandom_range(0, 255)) - 128;
        end else begin
          fr_re[f][n] = $signed($urandom_range(0, 40)) - 20;
          fr_im[f][n] = $signed($urandom_range(0, 40)) - 20;
        end
      end
      for (int k = 0; k < 8; k++) begin
        real sr, si;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < 8; n++) begin
          real c, s;
          c = $cos(2.0 * PI * n * k / 8.0);
          s = -$sin(2.0 * PI * n * k / 8.0);
          sr += fr_re[f][n] * c - fr_im[f][n] * s;
          si += fr_re[f][n] * s + fr_im[f][n] * c;
        end
        ex_re[f][k] = sat16(sr * 64.0);
        ex_im[f][k] = sat16(si * 64.0);
        if (iabs(ex_re[f][k]) >= 32767 || ex_im[f][k] >= 32767 || ex_im[f][k] <= -32768) n_sat++;
      end
      // which BF I twiddles see a nonzero difference x(k)-x(k+4)
      for (int k = 0; k < 4; k++)
        if (fr_re[f][k] != fr_re[f][k+4] || fr_im[f][k] != fr_im[f][k+4]) n_tw[k]++;
    end
  endtask

  // driver
  initial begin
    make_frames();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      stalled_in[f] = 0;
      for (int n = 0; n < 8; n++) begin
        // frames 20..59 hold start low now and then, mid-frame included
        if (f >= 20 && f < 60 && $urandom_range(0, 3) == 0) begin
          start <= 1'b0;
          xr <= 8'sh55; xi <= 8'sh2A;          // garbage that must be ignored
          n_stall++;
          stalled_in[f] = 1;
          @(posedge clk);
        end
        start <= 1'b1;
        xr <= IN_W'(fr_re[f][n]);
        xi <= IN_W'(fr_im[f][n]);
        @(posedge clk);
        if (n == 7) x7_cycle[f] = cycle;
      end
    end
    // the pipeline only moves on enabled cycles: feed zeros to flush the last frame
    xr <= '0; xi <= '0;
    repeat (3) @(posedge clk);
    start <= 1'b0;
    repeat (20) @(posedge clk);
    if (n_frames_out != NFRAMES) begin
      failures++;
      $display("FAIL: %0d frames out, %0d expected", n_frames_out, NFRAMES);
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL: no stall happened"); end
    if (n_sat == 0)   begin failures++; $display("FAIL: no saturation happened"); end
    if (n_b2b == 0)   begin failures++; $display("FAIL: no back-to-back frames"); end
    for (int k = 0; k < 4; k++)
      if (n_tw[k] == 0) begin failures++; $display("FAIL: twiddle W8^%0d never exercised", k); end
    checks += 7;
    $display("mechanisms: stalls=%0d saturated_bins=%0d back_to_back=%0d tw=%0d/%0d/%0d/%0d",
             n_stall, n_sat, n_b2b, n_tw[0], n_tw[1], n_tw[2], n_tw[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  int pair_idx = 0;
  int frame_out = 0;
  longint first_pair_cycle = 0, last_frame_start = -1;
  const int BIN_ORDER[4] = '{0, 2, 1, 3};

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int k;
      k = BIN_ORDER[pair_idx];
      checks++;
      if (frame_out >= NFRAMES) begin
        failures++;
        $display("FAIL: extra output pair at cycle %0d", cycle);
      end else begin
        if (out_bin != 2'(k)) begin
          failures++;
          $display("FAIL frame %0d pair %0d: out_bin=%0d expected %0d", frame_out, pair_idx, out_bin, k);
        end
        if (iabs(int'(y1r) - ex_re[frame_out][k]) > 2 || iabs(int'(y1i) - ex_im[frame_out][k]) > 2 ||
            iabs(int'(y2r) - ex_re[frame_out][k+4]) > 2 || iabs(int'(y2i) - ex_im[frame_out][k+4]) > 2) begin
          failures++;
          $display("FAIL frame %0d bins %0d/%0d: got (%0d,%0d) (%0d,%0d) expected (%0d,%0d) (%0d,%0d)",
                   frame_out, k, k + 4, y1r, y1i, y2r, y2i,
                   ex_re[frame_out][k], ex_im[frame_out][k], ex_re[frame_out][k+4], ex_im[frame_out][k+4]);
        end
        // latency: without a stall the pairs come 1..4 clocks after x(7)
        if (!stalled_in[frame_out] && !(frame_out + 1 < NFRAMES && stalled_in[frame_out + 1])) begin
          checks++;
          if (cycle - x7_cycle[frame_out] != longint'(pair_idx) + 1) begin
            failures++;
            $display("FAIL frame %0d pair %0d: latency %0d cycles after x(7), expected %0d",
                     frame_out, pair_idx, cycle - x7_cycle[frame_out], pair_idx + 1);
          end
        end
      end
      if (pair_idx == 0) begin
        // rate: unstalled consecutive frames start their output 8 clocks apart
        if (last_frame_start >= 0 && frame_out < NFRAMES && !stalled_in[frame_out] &&
            !stalled_in[frame_out - 1]) begin
          checks++;
          if (cycle - last_frame_start != 8) begin
            failures++;
            $display("FAIL: frame %0d output started %0d clocks after the previous one",
                     frame_out, cycle - last_frame_start);
          end else n_b2b++;
        end
        last_frame_start = cycle;
      end
      if (pair_idx == 3) begin
        pair_idx = 0;
        frame_out++;
        n_frames_out = frame_out;
      end else pair_idx++;
    end
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
