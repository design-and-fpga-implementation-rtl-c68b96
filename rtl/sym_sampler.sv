// sym_sampler: symbol-rate sampler of the receiver.
//
// Keeps one matched-filter output sample in every L: it counts the input
// strobes, skips the first OFFSET samples (the end-to-end delay to the first
// symbol peak) and then passes every L-th sample, pulsing `out_valid` for it.
// `phase` counts 0..L-1 between kept samples; phase 0 is the sample that was
// just kept. OFFSET is fixed at build time because the transceiver has a
// fixed latency; symbol timing recovery is not part of the design. Registered
// like the other stages.
//
// Taking one sample per symbol follows the design description; the skip-
// then-count scheme is this design's choice.
module sym_sampler
  import fb_pkg::*;
#(
  parameter int L      = 16,
  parameter int OFFSET = 0,
  localparam int PW    = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  iq_sample_t    in,
  output logic          out_valid,
  output iq_sample_t    out,
  output logic [PW-1:0] phase
);
  localparam int CW = $clog2(OFFSET + 2);
  logic [CW-1:0] skip;

  always_ff @(posedge clk) begin
    if (rst) begin
      skip      <= CW'(OFFSET);
      phase     <= PW'(L - 1);
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (skip != '0) begin
          skip <= skip - 1'b1;
        end else begin
          phase <= (phase == PW'(L - 1)) ? '0 : phase + 1'b1;
          if (phase == PW'(L - 1)) begin
            out       <= in;
            out_valid <= 1'b1;
          end
        end
      end
    end
  end
endmodule
