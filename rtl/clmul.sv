// clmul: schoolbook carry-less (GF(2)[x] polynomial) multiplier, AW x BW bits.
//
// Every partial product a AND b[i] is shifted by i and summed with XOR, so the result is the
// unreduced polynomial product of AW+BW-1 bits. Purely combinational. It is the base case
// of the Karatsuba multiplier and the x-value multiplier of the polynomial evaluation units.
module clmul #(
  parameter int unsigned AW = 16,
  parameter int unsigned BW = 16
) (
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-2:0] p
);
  always_comb begin
    p = '0;
    for (int i = 0; i < BW; i++) begin
      if (b[i]) p[i +: AW] = p[i +: AW] ^ a;
    end
  end
endmodule
