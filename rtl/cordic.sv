// CORDIC, unrolled and combinational. Angles are 32-bit two's complement
// with 2^32 = one full turn.
//   VECTOR = 0 (rotation):  (x_o, y_o) = K * rotate((x_i, y_i), z_i)
//   VECTOR = 1 (vectoring): z_o = z_i + atan2(y_i, x_i), x_o = K * |(x_i, y_i)|
// K ~ 1.6468 is the CORDIC gain; it is not removed here. A first step folds
// the problem into the right half plane (+-pi/2), then ITER micro-rotations
// by atan(2^-i) follow. The arctangent table is computed at elaboration.
// Inputs are W bits signed; outputs are W+2 bits to hold the gain.
module cordic #(
  parameter int W      = 16,
  parameter int ITER   = 16,
  parameter bit VECTOR = 1'b0
) (
  input  logic signed [W-1:0] x_i,
  input  logic signed [W-1:0] y_i,
  input  logic signed [31:0]  z_i,
  output logic signed [W+1:0] x_o,
  output logic signed [W+1:0] y_o,
  output logic signed [31:0]  z_o
);
  typedef logic signed [31:0] ang_t;
  typedef ang_t atan_tab_t [ITER];

  function automatic atan_tab_t mk_atan();
    atan_tab_t t;
    for (int i = 0; i < ITER; i++)
      t[i] = ang_t'($rtoi($atan(1.0 / (2.0 ** i)) / (2.0 * 3.14159265358979323846) * (2.0 ** 32) + 0.5));
    return t;
  endfunction

  localparam atan_tab_t ATAN = mk_atan();

  always_comb begin
    logic signed [W+1:0] x, y, xn;
    ang_t z;
    x = (W+2)'(x_i);
    y = (W+2)'(y_i);
    z = z_i;
    // fold into the right half plane
    if (VECTOR) begin
      if (x < 0) begin
        x = -x;
        y = -y;
        z = z + 32'sh8000_0000;
      end
    end else begin
      if (z > 32'sh4000_0000 || z < -32'sh4000_0000) begin
        x = -x;
        y = -y;
        z = z + 32'sh8000_0000;
      end
    end
    for (int i = 0; i < ITER; i++) begin
      logic d;  // 1: rotate counter-clockwise
      d  = VECTOR ? (y < 0) : (z >= 0);
      xn = d ? x - (y >>> i) : x + (y >>> i);
      y  = d ? y + (x >>> i) : y - (x >>> i);
      x  = xn;
      z  = d ? z - ATAN[i] : z + ATAN[i];
    end
    x_o = x;
    y_o = y;
    z_o = z;
  end
endmodule
