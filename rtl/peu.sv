// peu: polynomial evaluation unit of the share generation unit.
//
// Evaluates f(x) = c_{k-1} x^{k-1} + ... + c_1 x + c_0 over GF(2^W) by Horner's rule, taking
// one coefficient per cycle from the highest down. Its datapath is the one of the reference
// architecture: an accumulator register, a multiplier by the unit's own evaluation point x
// (XW bits wide, much narrower than W), a static XOR reduction and an XOR adder.
//   share = (first ? 0 : reduce(acc * x)) ^ coef
// share is combinational from acc and coef; on every coef_valid cycle acc takes share, so the
// cycle that adds c_0 presents the finished share. `first` marks c_{k-1}: it masks the
// product so no clear cycle is needed between polynomials. acc holds while coef_valid is low.
module peu #(
  parameter int unsigned W  = 64,
  parameter int unsigned XW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] x,
  input  logic          coef_valid,
  input  logic          first,
  input  logic [W-1:0]  coef,
  output logic [W-1:0]  share
);
  logic [W-1:0]      acc;
  logic [W+XW-2:0]   prod;
  logic [W-1:0]      prod_red;

  clmul     #(.AW(W), .BW(XW))            u_mult   (.a(acc), .b(x), .p(prod));
  gf_reduce #(.W(W), .IN_W(W+XW-1))       u_reduce (.d(prod), .q(prod_red));

  assign share = (first ? '0 : prod_red) ^ coef;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          acc <= '0;
    else if (coef_valid) acc <= share;
  end
endmodule
