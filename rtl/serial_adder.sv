// Bit-serial adder/subtractor (the "sigma" element of the serial filter).
// Operands arrive least significant bit first, one bit per clock. The sum bit
// is combinational; the carry is held in a flip-flop between bits. N_POS
// operands are added and N_NEG operands subtracted: a subtracted operand is
// inverted and its "+1" is preloaded into the carry when `first` is high
// (the first bit of a word). Carry width grows with the operand count so any
// mix of operands is summed exactly in two's complement.
module serial_adder #(
  parameter int unsigned N_POS = 2,
  parameter int unsigned N_NEG = 0
) (
  input  logic             clk,
  input  logic             first,            // high during bit 0 of a word
  input  logic [N_POS-1:0] pos,
  input  logic [(N_NEG>0 ? N_NEG : 1)-1:0] neg,
  output logic             sum
);
  localparam int unsigned N  = N_POS + N_NEG;
  localparam int unsigned CW = $clog2(N + 1) + 1;

  logic [CW-1:0] carry_q, carry_in, total;

  always_comb begin
    carry_in = first ? CW'(N_NEG) : carry_q;
    total    = carry_in;
    for (int i = 0; i < int'(N_POS); i++) total = total + CW'(pos[i]);
    for (int i = 0; i < int'(N_NEG); i++) total = total + CW'(!neg[i]);
    sum = total[0];
  end

  always_ff @(posedge clk) carry_q <= total >> 1;

endmodule
