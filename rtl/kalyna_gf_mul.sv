// kalyna_gf_mul: multiplies one byte by every constant of the Kalyna MDS
// vector (1, 4, 5, 6, 7, 8) in GF(2^8) modulo x^8 + x^4 + x^3 + x^2 + 1.
//
// Built as a chain of "times 2" circuits: times 2 is a left shift with the
// carried-out bit folded back as 0x1d (three XOR gates, on bits 2, 3 and 4,
// plus the wire into bit 0), and
//   x3 = x2 ^ x,  x4 = 2*x2,  x5 = x4 ^ x,  x6 = 2*x3,  x7 = x6 ^ x,  x8 = 2*x4.
// Combinational.
//
// This is the published times-2 chain; nothing here is this design's own.
module kalyna_gf_mul (
  input  logic [7:0] x,
  output logic [7:0] x4,
  output logic [7:0] x5,
  output logic [7:0] x6,
  output logic [7:0] x7,
  output logic [7:0] x8
);
  function automatic logic [7:0] times2(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (8'h1d & {8{a[7]}});
  endfunction

  logic [7:0] x2, x3;

  always_comb begin
    x2 = times2(x);
    x3 = x2 ^ x;
    x4 = times2(x2);
    x5 = x4 ^ x;
    x6 = times2(x3);
    x7 = x6 ^ x;
    x8 = times2(x4);
  end
endmodule
