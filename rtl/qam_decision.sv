// qam_decision: decision device for QPSK and 16-QAM.
//
// Divides each axis into decision regions and maps the region back to the
// bits of the transmit Gray code (inverse of qpsk_mapper / qam16_mapper).
//   BITS = 2 (QPSK): bit 0 = (I < 0), bit 1 = (Q < 0).
//   BITS = 4 (16-QAM): thresholds at 0 and +-2*UNIT on each axis, where UNIT
//   is the received amplitude of constellation level 1; bits [3:2] come from
//   the in-phase axis and bits [1:0] from the quadrature axis.
// `i_bits`/`q_bits` are the per-axis decisions (the c(t) and f(t) of the
// demodulator) and `sym` the whole symbol. Registered: outputs change at the
// edge where `in_valid` is high and `out_valid` pulses in the next cycle.
// The threshold placement is this design's choice (the midpoints between
// levels); the design description gives only the region principle.
module qam_decision
  import fb_pkg::*;
#(
  parameter int BITS = 4,
  parameter int UNIT = 4096,
  localparam int HB  = BITS / 2
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  sample_t         in_i,
  input  sample_t         in_q,
  output logic            out_valid,
  output logic [BITS-1:0] sym,
  output logic [HB-1:0]   i_bits,
  output logic [HB-1:0]   q_bits
);
  localparam sample_t TH = sample_t'(2 * UNIT);

  // 16-QAM in-phase regions: -3 -> 00, -1 -> 01, +1 -> 11, +3 -> 10.
  function automatic logic [1:0] slice4(sample_t v);
    if (v < -TH)       return 2'b00;
    else if (v < 0)    return 2'b01;
    else if (v < TH)   return 2'b11;
    else               return 2'b10;
  endfunction

  logic [HB-1:0] di, dq;

  always_comb begin
    if (BITS == 2) begin
      di = HB'(in_i < 0);
      dq = HB'(in_q < 0);
    end else begin
      di = HB'(slice4(in_i));
      dq = HB'(slice4(-in_q));   // quadrature code is mirrored in sign
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_bits    <= '0;
      q_bits    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_bits <= di;
        q_bits <= dq;
      end
    end
  end

  // QPSK carries the in-phase bit in bit 0; 16-QAM in bits [3:2].
  assign sym = (BITS == 2) ? BITS'({q_bits, i_bits}) : BITS'({i_bits, q_bits});

  initial assert (BITS == 2 || BITS == 4) else $error("qam_decision: BITS must be 2 or 4");
endmodule
