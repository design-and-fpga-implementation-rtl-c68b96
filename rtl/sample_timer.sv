// sample_timer: sample-period frame counter.
//
// Every line sample takes CLK_PER_SAMPLE system clocks (32 by default:
// 13.89 MHz / 32 = 434 kS/s, the line sampling rate). The counter `slot`
// runs 0..CLK_PER_SAMPLE-1 and `samp_en` is high for one clock when slot is
// 0. The serial converter interfaces use `slot` to place their 16-clock
// transfer inside the frame; the DSP chain advances one sample per samp_en.
// The 32-clock frame is derived from the clock and sampling rates in the
// design description; the counter itself is this design's choice.
module sample_timer #(
  parameter int CLK_PER_SAMPLE = 32
) (
  input  logic                              clk,
  input  logic                              rst,
  output logic [$clog2(CLK_PER_SAMPLE)-1:0] slot,
  output logic                              samp_en
);
  localparam int SW = $clog2(CLK_PER_SAMPLE);

  always_ff @(posedge clk) begin
    if (rst)                                  slot <= '0;
    else if (slot == SW'(CLK_PER_SAMPLE - 1)) slot <= '0;
    else                                      slot <= slot + 1'b1;
  end

  assign samp_en = ~rst && (slot == '0);
endmodule
