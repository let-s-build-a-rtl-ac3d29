// shifter: K-bit left and right shifter, both results at once.
//
// shl = a shifted left by amt places, zeros shifted in.
// shr = a shifted right by amt places with the sign bit copied in
//       (arithmetic shift, as the TOY machine defines it).
// amt is a full K-bit unsigned word; an amount of K or more shifts every
// bit out (shl = 0, shr = all sign bits). Only the function is specified,
// so this is written as a plain barrel shift. Purely combinational.
module shifter #(
  parameter int K = 10
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] amt,
  output logic [K-1:0] shl,
  output logic [K-1:0] shr
);
  always_comb begin
    if (32'(amt) >= K) begin
      shl = '0;
      shr = {K{a[K-1]}};
    end else begin
      shl = a << amt;
      shr = K'($signed(a) >>> amt);
    end
  end
endmodule
