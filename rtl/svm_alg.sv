// svm_alg: simplified space-vector modulation for the three-level inverter.
//
// Follows the source design's algorithm: take floor and ceil of the three line-to-line
// modulation signals, f = floor(V), c = ceil(V) and pick the
// triangle of the space-vector diagram from the floor sum:
//   f_ab+f_bc+f_ca = -1 : V1 = (f_ab,f_bc,c_ca)  d_v1 = V_ca - f_ca
//                         V2 = (c_ab,f_bc,f_ca)  d_v2 = V_ab - f_ab
//                         V3 = (f_ab,c_bc,f_ca)  d_v3 = V_bc - f_bc
//   otherwise (-2)      : V1 = (f_ab,c_bc,c_ca)  d_v1 = c_ab - V_ab
//                         V2 = (c_ab,c_bc,f_ca)  d_v2 = c_ca - V_ca
//                         V3 = (c_ab,f_bc,c_ca)  d_v3 = c_bc - V_bc
// The three duty cycles always add to one and d_v1*V1 + d_v2*V2 + d_v3*V3
// equals the reference. This design takes ceil = floor + 1 throughout. When
// all three inputs are integers (floor sum 0, the reference sits exactly on a
// lattice point) V_ca is treated as f_ca = V_ca - 1 with fraction 1, which
// gives V1 = the point itself with d_v1 = 1 and the other duties zero.
// Inputs must sum to zero (transform guarantees it; an assertion checks it).
// Outputs are registered: one clock of latency.
module svm_alg
  import svm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [V_W-1:0] V_a,
  input  logic signed [V_W-1:0] V_b,
  input  logic signed [V_W-1:0] V_c,
  output svec_t                 V1,
  output svec_t                 V2,
  output svec_t                 V3,
  output logic [D_W-1:0]        d_v1,
  output logic [D_W-1:0]        d_v2,
  output logic [D_W-1:0]        d_v3
);

  localparam int unsigned I_W = V_W - V_FRAC;  // integer part width

  logic signed [I_W-1:0] f_ab, f_bc, f_ca;
  logic [D_W-1:0]        r_ab, r_bc, r_ca;    // fraction, duty format
  logic signed [I_W+1:0] f_sum;
  svec_t                 n1, n2, n3;
  logic [D_W-1:0]        m1, m2, m3;

  function automatic coord_t to_c(input logic signed [I_W-1:0] x);
    return coord_t'(x);
  endfunction

  always_comb begin
    f_ab = V_a[V_W-1:V_FRAC];
    f_bc = V_b[V_W-1:V_FRAC];
    f_ca = V_c[V_W-1:V_FRAC];
    r_ab = D_W'({V_a[V_FRAC-1:0], 1'b0});
    r_bc = D_W'({V_b[V_FRAC-1:0], 1'b0});
    r_ca = D_W'({V_c[V_FRAC-1:0], 1'b0});
    f_sum = (I_W+2)'(f_ab) + (I_W+2)'(f_bc) + (I_W+2)'(f_ca);
    if (f_sum == 0) begin
      // reference on a lattice point
      f_ca  = f_ca - 1'b1;
      r_ca  = D_W'(D_ONE);
      f_sum = -1;
    end
    if (f_sum == -1) begin
      n1 = '{ab: to_c(f_ab),      bc: to_c(f_bc),      ca: to_c(f_ca + 1'b1)};
      n2 = '{ab: to_c(f_ab + 1'b1), bc: to_c(f_bc),    ca: to_c(f_ca)};
      n3 = '{ab: to_c(f_ab),      bc: to_c(f_bc + 1'b1), ca: to_c(f_ca)};
      m1 = r_ca;
      m2 = r_ab;
      m3 = r_bc;
    end else begin
      n1 = '{ab: to_c(f_ab),        bc: to_c(f_bc + 1'b1), ca: to_c(f_ca + 1'b1)};
      n2 = '{ab: to_c(f_ab + 1'b1), bc: to_c(f_bc + 1'b1), ca: to_c(f_ca)};
      n3 = '{ab: to_c(f_ab + 1'b1), bc: to_c(f_bc),        ca: to_c(f_ca + 1'b1)};
      m1 = D_W'(D_ONE) - r_ab;
      m2 = D_W'(D_ONE) - r_ca;
      m3 = D_W'(D_ONE) - r_bc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      V1   <= '0;
      V2   <= '{ab: 3'sd1, bc: 3'sd0, ca: -3'sd1};
      V3   <= '{ab: 3'sd0, bc: 3'sd1, ca: -3'sd1};
      d_v1 <= D_W'(D_ONE);
      d_v2 <= '0;
      d_v3 <= '0;
    end else begin
      V1   <= n1;
      V2   <= n2;
      V3   <= n3;
      d_v1 <= m1;
      d_v2 <= m2;
      d_v3 <= m3;
    end
  end

  // The three line-to-line signals must sum to zero.
  a_zero_sum: assert property (@(posedge clk) disable iff (!rst_n)
    V_W'(V_a + V_b + V_c) == '0);

endmodule
