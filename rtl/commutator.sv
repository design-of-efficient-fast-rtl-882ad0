// commutator -- register-allocated reordering between two butterfly units.
//
// The folded flow graph leaves each butterfly column producing two values
// per cycle in an order the next column cannot use. Lifetime analysis shows
// that 2*DEPTH registers suffice to hold them, and forward-backward register
// allocation places them in one chain with a multiplexer in the middle:
//
//   bot_in --[R1..R_D]--+--\/--+----------------------- bot_out  (mux 2)
//   top_in -------------+--/\--+--[R_D+1..R_2D]-------- top_out
//                            (mux 1 feeds R_D+1)
//
// When swap is 0 the upper input enters the second half of the chain and
// the lower output comes from R_D; when swap is 1 R_D moves on into R_D+1
// and the upper input goes straight to the lower output. The upper output
// is always the last register.
//
// With DEPTH=2 these are the registers R1..R4 between butterfly units I and
// II. Fed (y0,y4),(y1,y5),(y2,y6),(y3,y7) and swapping in the last two of
// the four cycles, the registers hold, cycle by cycle from the cycle after
// y0/y4 appear, R1..R4 = (y4,-,y0,-), (y5,y4,y1,y0), (y6,y5,y4,y1),
// (y7,y6,y5,y4), (-,y7,-,y5), and the outputs are (y0,y2), (y1,y3), (y4,y6),
// (y5,y7). With DEPTH=1 it is the 1D stage in front of butterfly unit III,
// swapping every second cycle, and turns (z0,z2),(z1,z3),(z4,z6),(z5,z7)
// into (z0,z1),(z2,z3),(z4,z5),(z6,z7). swap is sampled in the cycle the
// data pass the multiplexers. Registers move only when en is 1 (this
// implementation's stall); reset clears them. The register counts, their
// contents and the multiplexer positions follow the published allocation.
module commutator
  import fft_pkg::*;
#(
  parameter int DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  swap,
  input  cplx_t top_in,
  input  cplx_t bot_in,
  output cplx_t top_out,
  output cplx_t bot_out
);

  cplx_t bot_dly, sw_top;

  delay_line #(.DEPTH(DEPTH)) u_pre (
    .clk(clk), .rst_n(rst_n), .en(en), .din(bot_in), .dout(bot_dly)
  );

  always_comb begin
    if (swap) begin
      sw_top  = bot_dly;
      bot_out = top_in;
    end else begin
      sw_top  = top_in;
      bot_out = bot_dly;
    end
  end

  delay_line #(.DEPTH(DEPTH)) u_post (
    .clk(clk), .rst_n(rst_n), .en(en), .din(sw_top), .dout(top_out)
  );

endmodule
