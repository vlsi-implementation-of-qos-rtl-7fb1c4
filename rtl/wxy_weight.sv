// wxy_weight: weight of one output direction for weighted-XY routing.
//
// One of the four W0..W3 units. The weight grows with the bandwidth still
// available on the link (A) and with the distance left to travel in that
// direction (d): W = A*d + T when the link can carry the connection (A >= R),
// otherwise W = A. The multiplier, adder, comparator and 2-way mux, their
// inputs A, R, T, d and the 32-bit weight width are those of the weight
// calculation unit of the wXY micro-architecture. Which mux input the
// comparator selects is not stated there; this design picks A*d + T for a
// link that has enough bandwidth. Because A <= T, every link with enough
// bandwidth then outweighs every link without it.
//
// Purely combinational.
module wxy_weight #(
  parameter int unsigned BW_W = 8,   // width of A, R and T
  parameter int unsigned D_W  = 2,   // width of the coordinate distance
  parameter int unsigned W_W  = 32   // weight width
) (
  input  logic [BW_W-1:0] avail,     // A: available bandwidth of the link
  input  logic [BW_W-1:0] req,       // R: bandwidth the connection requires
  input  logic [BW_W-1:0] total,     // T: total bandwidth of a link
  input  logic [D_W-1:0]  distance,      // d: distance to go in this direction
  output logic [W_W-1:0]  weight
);
  logic [W_W-1:0] prod, sum;
  logic           enough;

  always_comb begin
    prod   = W_W'(avail) * W_W'(distance);
    sum    = prod + W_W'(total);
    enough = (avail >= req);
    weight = enough ? sum : W_W'(avail);
  end
endmodule
