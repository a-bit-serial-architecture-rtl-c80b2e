// Bit-serial 6-tap luma interpolation filter
//   y = a - 5b + 20c + 20d - 5e + f
// built from four serial adder sections and four one-bit delays, as in the
// source architecture's filter figure. Operands are two's complement, least
// significant bit first, one bit per clock; `first` marks bit 0.
//   s1 = c + d
//   s2 = 4*s1 - (b + e)       (two delays on s1 multiply by 4)
//   s3 = 4*s2 + s2 = 5*s2     (two more delays multiply by 4)
//   y  = s3 + a + f
// A delay in an LSB-first stream shifts the word left; the delay registers
// are cleared at bit 0 so each word starts clean. The output bit is
// registered (one clock of latency) so filters can be chained without long
// combinational paths; this register is this design's choice. Feed at least
// as many bits as the result needs (unsigned 8-bit inputs need 15 result bits;
// a second stage fed with first-stage results needs 20).
module luma_serial_filter (
  input  logic clk,
  input  logic first,
  input  logic a, b, c, d, e, f,
  output logic y            // bit t of the result appears one clock after input bit t
);
  logic s1, s2, s3, s4;
  logic d1_q, d2_q, d3_q, d4_q;   // the four T delays
  logic s1x4, s2x4;
  logic first_q;

  // delayed values with the bits shifted in from "before bit 0" forced to zero
  assign s1x4 = first ? 1'b0 : (first_q ? 1'b0 : d2_q);
  assign s2x4 = first ? 1'b0 : (first_q ? 1'b0 : d4_q);

  serial_adder #(.N_POS(2), .N_NEG(0)) u_add1 (.clk, .first, .pos({c, d}),      .neg(1'b0),   .sum(s1));
  serial_adder #(.N_POS(1), .N_NEG(2)) u_add2 (.clk, .first, .pos(s1x4),        .neg({b, e}), .sum(s2));
  serial_adder #(.N_POS(2), .N_NEG(0)) u_add3 (.clk, .first, .pos({s2x4, s2}),  .neg(1'b0),   .sum(s3));
  serial_adder #(.N_POS(3), .N_NEG(0)) u_add4 (.clk, .first, .pos({s3, a, f}),  .neg(1'b0),   .sum(s4));

  always_ff @(posedge clk) begin
    first_q <= first;
    d1_q    <= s1;
    d2_q    <= d1_q;
    d3_q    <= s2;
    d4_q    <= d3_q;
    y       <= s4;
  end

endmodule
