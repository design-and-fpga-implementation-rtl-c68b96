// fourband_top: four-band transceiver for a channel with severe intersymbol
// interference.
//
// The 250 MHz board oscillator is divided by 18 to the 13.89 MHz system
// clock; every 32 system clocks is one line sample (434 kS/s). The
// transmitter sends four independent pseudo-random streams in four
// sub-bands, adds them and ships each sample to an AD7303 DAC over its
// serial port. The receiver reads an AD7476A ADC on the far end of the line,
// applies the maximally flat channel-emulation filter and demodulates the
// four bands. Transmitted and received symbols are brought out for
// monitoring; the design itself contains no error counter.
//
// Timing: the serial transfers occupy slots 0..17 of each 32-clock frame.
// A sample leaves the transmitter in frame n, is sent to the DAC in frame
// n+1 and is read back by the ADC in frame n+2 when the line is a direct
// connection; fourband_rx's LINE_LAG = 2 assumes exactly that. The first
// received symbol of every band is the first transmitted one.
//
// Reset `rst` is synchronous to clk_in for the divider and is synchronized
// into the system clock with asynchronous assertion. The `as_*` ports belong
// to a separate example circuit (addsub) that shares nothing with the
// transceiver.
//
// The clock division by 18, the 434 kS/s sample rate and the converter chips
// follow the design description; the 32-clock frame, the reset synchroniser
// and the side-by-side add/subtract example are this design's choices.
module fourband_top
  import fb_pkg::*;
(
  input  logic       clk_in,
  input  logic       rst,
  // AD7303 DAC
  output logic       dac_sync_n,
  output logic       dac_sclk,
  output logic       dac_din,
  // AD7476A ADC
  output logic       adc_cs_n,
  output logic       adc_sclk,
  input  logic       adc_sdata,
  // monitoring
  output logic       clk_sys,
  output logic [3:0] tx_sym       [4],
  output logic       tx_sym_valid [4],
  output logic [3:0] rx_sym       [4],
  output logic       rx_sym_valid [4],
  output logic [1:0] rx_line      [4],
  output logic       rx_line_sel  [4],
  // stand-alone adder/subtractor example
  input  logic       as_clk,
  input  logic [7:0] as_a,
  input  logic [7:0] as_b,
  input  logic       as_c,
  output logic [8:0] as_result
);
  localparam int SW = $clog2(CLK_PER_SAMPLE);

  logic [2:0]    rst_sync;
  logic          rst_sys;
  logic [SW-1:0] slot;
  logic          samp_en, tx_valid, adc_valid;
  sample_t       tx_sample, rx_sample;
  logic [7:0]    dac_code;
  logic [11:0]   adc_code;

  clk_div #(.DIV(CLK_DIV)) u_clk_div (
    .clk_in  (clk_in),
    .rst     (rst),
    .clk_out (clk_sys)
  );

  always_ff @(posedge clk_sys or posedge rst) begin
    if (rst) rst_sync <= '1;
    else     rst_sync <= {rst_sync[1:0], 1'b0};
  end
  assign rst_sys = rst_sync[2];

  sample_timer #(.CLK_PER_SAMPLE(CLK_PER_SAMPLE)) u_timer (
    .clk     (clk_sys),
    .rst     (rst_sys),
    .slot    (slot),
    .samp_en (samp_en)
  );

  fourband_tx u_tx (
    .clk       (clk_sys),
    .rst       (rst_sys),
    .samp_en   (samp_en),
    .sym       (tx_sym),
    .sym_valid (tx_sym_valid),
    .out_valid (tx_valid),
    .out       (tx_sample)
  );

  dac_spi #(.SW(SW)) u_dac (
    .clk    (clk_sys),
    .rst    (rst_sys),
    .slot   (slot),
    .sample (tx_sample),
    .sync_n (dac_sync_n),
    .sclk   (dac_sclk),
    .din    (dac_din),
    .code   (dac_code)
  );

  adc_spi #(.SW(SW)) u_adc (
    .clk   (clk_sys),
    .rst   (rst_sys),
    .slot  (slot),
    .sdata (adc_sdata),
    .cs_n  (adc_cs_n),
    .sclk  (adc_sclk),
    .valid (adc_valid),
    .out   (rx_sample),
    .code  (adc_code)
  );

  fourband_rx u_rx (
    .clk       (clk_sys),
    .rst       (rst_sys),
    .in_valid  (adc_valid),
    .in        (rx_sample),
    .sym       (rx_sym),
    .sym_valid (rx_sym_valid),
    .line      (rx_line),
    .line_sel  (rx_line_sel)
  );

  addsub u_addsub (
    .clk    (as_clk),
    .a      (as_a),
    .b      (as_b),
    .c      (as_c),
    .result (as_result)
  );

  // The DAC takes the latest transmit sample at slot 0; the strobe and the
  // codes are only observed in simulation.
  wire unused_ok = tx_valid | (|dac_code) | (|adc_code);
endmodule
