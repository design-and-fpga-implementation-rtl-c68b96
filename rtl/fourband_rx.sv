// fourband_rx: four-band receiver.
//
// The converted line samples first pass the maximally flat filter, which
// turns the short laboratory line into a channel with the attenuation of a
// long telephone line, and then fan out to four rx_band lanes with the same
// band plan as fourband_tx. LINE_LAG is the number of samples between a
// transmit mixer output and the matching ADC sample (2 with the serial
// interfaces of fourband_top and a direct line); from it the lanes' carrier
// lag (LINE_LAG + 20, the filter delay) and symbol offset (LINE_LAG + 20 +
// 2*64, adding both square-root raised-cosine delays) are derived.
// `sym[b]` is 4 bits wide; the QPSK lane uses bits [1:0] and `line[b]`
// bit 0.
//
// The channel filter in front of four lanes follows the published receiver
// diagram; the way LAG and OFFSET are derived is this design's choice.
module fourband_rx
  import fb_pkg::*;
#(
  parameter int F2_HZ    = 33_910,
  parameter int F3_HZ    = 54_250,
  parameter int F4_HZ    = 74_600,
  parameter int LINE_LAG = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  sample_t    in,
  output logic [3:0] sym       [4],
  output logic       sym_valid [4],
  output logic [1:0] line      [4],
  output logic       line_sel  [4]
);
  localparam int LAG    = LINE_LAG + (MF_TAPS - 1) / 2;
  localparam int OFFSET = LAG + 2 * ((SRRC_TAPS - 1) / 2);

  logic    f_valid;
  sample_t f;
  logic [1:0] sym_bb;
  logic       line_bb;

  maxflat_fir u_chan (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .in        (in),
    .out_valid (f_valid),
    .out       (f)
  );

  rx_band #(.BITS(2), .L(16), .F_HZ(0), .LAG(LAG), .OFFSET(OFFSET)) u_band1 (
    .clk (clk), .rst (rst), .in_valid (f_valid), .in (f),
    .sym (sym_bb), .sym_valid (sym_valid[0]), .line (line_bb), .line_sel (line_sel[0])
  );
  assign sym[0]  = {2'b00, sym_bb};
  assign line[0] = {1'b0, line_bb};

  rx_band #(.BITS(4), .L(32), .F_HZ(F2_HZ), .LAG(LAG), .OFFSET(OFFSET)) u_band2 (
    .clk (clk), .rst (rst), .in_valid (f_valid), .in (f),
    .sym (sym[1]), .sym_valid (sym_valid[1]), .line (line[1]), .line_sel (line_sel[1])
  );
  rx_band #(.BITS(4), .L(32), .F_HZ(F3_HZ), .LAG(LAG), .OFFSET(OFFSET)) u_band3 (
    .clk (clk), .rst (rst), .in_valid (f_valid), .in (f),
    .sym (sym[2]), .sym_valid (sym_valid[2]), .line (line[2]), .line_sel (line_sel[2])
  );
  rx_band #(.BITS(4), .L(32), .F_HZ(F4_HZ), .LAG(LAG), .OFFSET(OFFSET)) u_band4 (
    .clk (clk), .rst (rst), .in_valid (f_valid), .in (f),
    .sym (sym[3]), .sym_valid (sym_valid[3]), .line (line[3]), .line_sel (line_sel[3])
  );
endmodule
