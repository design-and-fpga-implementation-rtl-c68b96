// tb_fourband_top: end-to-end test of the four-band transceiver.
//
// The DAC serial port drives a model of the AD7303, whose output code is
// wired (a direct, lossless line; 8-bit code to 12-bit code with the same
// full scale) to a model of the AD7476A read by the receiver. The test runs
// the design at its default parameters for N_SYM symbols of the 16-QAM
// bands and checks:
//   - every transmitted symbol against an independent 9x+3 sequence;
//   - every received symbol of bands 2 and 3 against the transmitted one,
//     and the in-phase bit of the QPSK band (its quadrature rail is
//     multiplied by sin(0) = 0 and never reaches the line, so the receiver
//     must decide 0 for it);
//   - band 4, which sits on the steep edge of the line filter: its symbol
//     bit errors are counted and must stay below 10 % of its bits;
//   - symbol and sample rates in system clocks;
//   - that every mechanism occurred: DAC and ADC transfers, generator
//     wrap-around, both multiplexer selections, all four bands received.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_fourband_top;
  import fb_pkg::*;

  localparam int N_SYM = 120;   // 16-QAM symbols per band to receive

  logic       clk_in = 1'b0;
  logic       rst;
  logic       dac_sync_n, dac_sclk, dac_din, adc_cs_n, adc_sclk, adc_sdata, clk_sys;
  logic [3:0] tx_sym [4], rx_sym [4];
  logic       tx_sym_valid [4], rx_sym_valid [4], rx_line_sel [4];
  logic [1:0] rx_line [4];
  logic [8:0] as_result;
  logic [7:0] dac_a, dac_b;
  int         dac_words, adc_convs;

  always #2 clk_in = ~clk_in;   // 250 MHz board oscillator

  fourband_top dut (
    .clk_in, .rst,
    .dac_sync_n, .dac_sclk, .dac_din,
    .adc_cs_n, .adc_sclk, .adc_sdata,
    .clk_sys, .tx_sym, .tx_sym_valid, .rx_sym, .rx_sym_valid, .rx_line, .rx_line_sel,
    .as_clk (clk_in), .as_a (8'd10), .as_b (8'd7), .as_c (1'b1), .as_result
  );

  ad7303_model u_dac (
    .sync_n (dac_sync_n), .sclk (dac_sclk), .din (dac_din),
    .out_a (dac_a), .out_b (dac_b), .words (dac_words)
  );

  ad7476a_model u_adc (
    .cs_n (adc_cs_n), .sclk (adc_sclk), .vin ({dac_a, 4'b0000}),
    .sdata (adc_sdata), .conversions (adc_convs)
  );

  int checks = 0, failures = 0;
  int tx_n [4], rx_n [4], rx_err [4];
  longint tx_last [4], rx_last [4];
  int wraps = 0, sel0 = 0, sel1 = 0;
  logic [3:0] tx_ref [4], rx_ref [4];
  longint cyc = 0;

  function automatic logic [3:0] next_sym(logic [3:0] x, int w);
    logic [3:0] y;
    y = 4'(9 * int'(x) + 3);
    return (w == 2) ? {2'b00, y[1:0]} : y;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk_sys) begin
    cyc <= cyc + 1;
    if (!dut.rst_sys) begin
      for (int b = 0; b < 4; b++) begin
        if (tx_sym_valid[b]) begin
          check(tx_sym[b] == tx_ref[b], $sformatf("band %0d tx symbol %0d: %0d, expected %0d",
                                                 b + 1, tx_n[b], tx_sym[b], tx_ref[b]));
          if (tx_n[b] > 0)
            check(cyc - tx_last[b] == ((b == 0) ? 16 : 32) * CLK_PER_SAMPLE,
                  $sformatf("band %0d tx symbol period %0d", b + 1, cyc - tx_last[b]));
          if (tx_n[b] > 0 && tx_sym[b] == 0) wraps++;
          tx_last[b] = cyc;
          tx_ref[b] = next_sym(tx_ref[b], (b == 0) ? 2 : 4);
          tx_n[b]++;
        end
        if (rx_sym_valid[b]) begin
          if (rx_n[b] > 0)
            check(cyc - rx_last[b] == ((b == 0) ? 16 : 32) * CLK_PER_SAMPLE,
                  $sformatf("band %0d rx symbol period %0d", b + 1, cyc - rx_last[b]));
          rx_last[b] = cyc;
          if (b == 0) begin
            check(rx_sym[0][0] == rx_ref[0][0],
                  $sformatf("band 1 rx symbol %0d in-phase bit: %0d, expected %0d",
                            rx_n[0], rx_sym[0][0], rx_ref[0][0]));
            check(rx_sym[0][1] == 1'b0, "band 1 quadrature decision not 0");
          end else if (b == 3) begin
            rx_err[3] += $countones(rx_sym[3] ^ rx_ref[3]);
          end else begin
            check(rx_sym[b] == rx_ref[b], $sformatf("band %0d rx symbol %0d: %0d, expected %0d",
                                                   b + 1, rx_n[b], rx_sym[b], rx_ref[b]));
          end
          rx_ref[b] = next_sym(rx_ref[b], (b == 0) ? 2 : 4);
          rx_n[b]++;
        end
      end
      if (rx_n[1] > 0) begin
        if (rx_line_sel[1]) sel1++;
        else                sel0++;
      end
    end
  end

  initial begin
    for (int b = 0; b < 4; b++) begin
      tx_n[b] = 0; rx_n[b] = 0; rx_err[b] = 0; tx_ref[b] = '0; rx_ref[b] = '0;
      tx_last[b] = 0; rx_last[b] = 0;
    end
    // start low so that the asynchronous reset sees a rising edge
    rst = 1'b0;
    #5 rst = 1'b1;
    repeat (200) @(posedge clk_in);
    rst = 1'b0;
    wait (rx_n[3] >= N_SYM);
    @(posedge clk_sys);
    $display("received symbols per band: %0d %0d %0d %0d", rx_n[0], rx_n[1], rx_n[2], rx_n[3]);
    $display("band 4 bit errors: %0d of %0d bits", rx_err[3], 4 * rx_n[3]);
    $display("DAC words %0d, ADC conversions %0d, generator wraps %0d, mux I %0d Q %0d",
             dac_words, adc_convs, wraps, sel0, sel1);
    check(rx_err[3] * 10 < 4 * rx_n[3], "band 4 bit error rate above 10 %");
    check(dac_words > 0 && adc_convs > 0, "no converter transfers");
    check(dac_words >= rx_n[1] * 32 && adc_convs - dac_words <= 1,
          "converter transfers do not match the line samples");
    check(wraps > 0, "generator never wrapped");
    check(sel0 > 0 && sel1 > 0, "multiplexer did not select both rails");
    for (int b = 0; b < 4; b++) check(rx_n[b] > 0, $sformatf("band %0d received nothing", b + 1));
    check(as_result == 9'd17, "example adder");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat ((N_SYM + 20) * 32 * CLK_PER_SAMPLE * CLK_DIV) @(posedge clk_in);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
