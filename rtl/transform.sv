// transform: turns the alpha-beta reference (V_x, V_y) into the three
// line-to-line modulation signals V_a, V_b, V_c used by svm_alg.
//
// The source design gives only what the block does. With U_x, U_y in units of one
// level step (U_d/2) and the amplitude-invariant Clarke transform, the
// line-to-line voltages in the same units are
//   V_a = V_ab =  3/2 U_x - sqrt(3)/2 U_y
//   V_b = V_bc =  sqrt(3) U_y
//   V_c = V_ca = -(V_a + V_b)
// so the lattice points of the space-vector diagram become integer triples.
// V_c is formed from the other two so the three always sum to exactly zero,
// which svm_alg relies on. Constants are 16-bit with 14 fraction bits and the
// products are truncated toward minus infinity. One register stage: outputs
// follow the inputs one clock later.
module transform
  import svm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [U_W-1:0] V_x,
  input  logic signed [U_W-1:0] V_y,
  output logic signed [V_W-1:0] V_a,
  output logic signed [V_W-1:0] V_b,
  output logic signed [V_W-1:0] V_c
);

  localparam logic signed [17:0] K_3_2    = 18'sd24576;  // 1.5 * 2^14
  localparam logic signed [17:0] K_SQ3    = 18'sd28378;  // sqrt(3) * 2^14
  localparam logic signed [17:0] K_SQ3_2  = 18'sd14189;  // sqrt(3)/2 * 2^14

  logic signed [35:0] p_ab, p_bc;
  logic signed [V_W-1:0] ab, bc;

  always_comb begin
    p_ab = 36'(V_x) * K_3_2 - 36'(V_y) * K_SQ3_2;
    p_bc = 36'(V_y) * K_SQ3;
    ab   = V_W'(p_ab >>> V_FRAC);
    bc   = V_W'(p_bc >>> V_FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      V_a <= '0;
      V_b <= '0;
      V_c <= '0;
    end else begin
      V_a <= ab;
      V_b <= bc;
      V_c <= -(ab + bc);
    end
  end

endmodule
