// tb_delay_line -- checks the shift-register delay unit at DEPTH 4 (the input
// 4D unit) and DEPTH 1. Random complex samples enter with a random enable;
// a queue model says what must leave: the sample that entered DEPTH enabled
// cycles earlier, zero after reset, and nothing moves while en is 0.
module tb_delay_line;
  import fft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  cplx_t din = '0, dout4, dout1;
  int checks = 0, failures = 0;
  cplx_t hist[$];

  delay_line #(.DEPTH(4)) dut4 (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(dout4));
  delay_line #(.DEPTH(1)) dut1 (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(dout1));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 4; i++) hist.push_back('0);
    for (int i = 0; i < 500; i++) begin
      cplx_t v;
      v.re = data_t'($urandom);
      v.im = data_t'($urandom);
      en  <= ($urandom_range(0, 3) != 0);
      din <= v;
      @(posedge clk);
      if (en) hist.push_back(din);
      #1;
      checks += 2;
      if (dout4 !== hist[hist.size() - 4]) begin
        failures++;
        $display("FAIL step %0d: DEPTH=4 out %h expected %h", i, dout4, hist[hist.size() - 4]);
      end
      if (dout1 !== hist[hist.size() - 1]) begin
        failures++;
        $display("FAIL step %0d: DEPTH=1 out %h expected %h", i, dout1, hist[hist.size() - 1]);
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
