// mclk_div: master clock for the codec.
//
// Divides the 50 MHz system clock by four (two toggling stages) to give the
// codec's master clock, aud_xclk, of 12.5 MHz, close to the codec's nominal
// 12.288 MHz. The division by four follows the published design; the
// single two-bit counter and its reset are this design's form of it.
//
// Timing: aud_xclk is a registered output; its edges follow clk edges.
module mclk_div (
  input  logic clk,
  input  logic reset,
  output logic aud_xclk
);
  logic [1:0] cnt;
  always_ff @(posedge clk) begin
    if (reset) cnt <= '0;
    else       cnt <= cnt + 1'b1;
  end
  assign aud_xclk = cnt[1];
endmodule
