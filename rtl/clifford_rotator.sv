// clifford_rotator: 3D rotation functional unit of the Clifford ALU.
//
// Rotates the vector v = x e1 + y e2 + z e3 (operand A, fields A, B, C) by the
// rotor R = q0 + q1 e12 + q2 e13 + q3 e23 (operand B, fields A..D = q0..q3):
// v' = R v R~, with R~ = q0 - q1 e12 - q2 e13 - q3 e23. Expanding the two
// geometric products (Euclidean signature) gives v' = M v with
//
//   M00 = q0q0 - q1q1 - q2q2 + q3q3   M01 = 2(q0q1 - q2q3)   M02 = 2(q0q2 + q1q3)
//   M10 = -2(q0q1 + q2q3)   M11 = q0q0 - q1q1 + q2q2 - q3q3   M12 = 2(q0q3 - q1q2)
//   M20 = 2(q1q3 - q0q2)    M21 = -2(q0q3 + q1q2)   M22 = q0q0 + q1q1 - q2q2 - q3q3
//
// One bank of ten fixed-point multipliers is used twice, selected by a mux
// layer in front of it:
//   clock 1  mux layer: the ten distinct rotor products qa*qb
//   clock 2  multiplier layer
//   clock 3  mux layer: the nine matrix coefficients (sums of those
//            products) paired with x, y, z
//   clock 4  multiplier layer
//   clock 5  sums: three three-term sums into the result register
// `ce` (rotation_ce) is a level; the unit starts once on its rising edge and
// raises `we` (rotation_we) in the cycle after the sums load, holding it until
// `ce` falls. The result is one vector part (field D zero). The rotor is not
// normalised: a non-unit rotor scales the vector by |R|^2.
//
// The two passes through one multiplier bank, the mux layer and the final
// sums follow the document. The operand layout of the rotor, the bank size
// and the fixed-point format are this design's choices.
//
// The IDs and tags of both operands are not used by a rotation (the ALU
// labels the result); lint reports them as unused bits.
module clifford_rotator
  import cliffosor_pkg::*;
#(
  parameter int unsigned FRAC_BITS = FRAC_BITS_DEFAULT
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ce,
  input  homog_t   a,        // vector to rotate
  input  homog_t   b,        // rotor
  output logic     we,
  output result_t  res
);

  localparam int unsigned N_MULT = 10;

  logic started, v1, v2, v3, v4, v5, we_q, start;
  assign start = ce && !started;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {started, v1, v2, v3, v4, v5, we_q} <= '0;
    end else begin
      started <= ce;
      v1 <= start;
      v2 <= v1;
      v3 <= v2;
      v4 <= v3;
      v5 <= v4;
      we_q <= ce && (we_q || v5);
    end
  end
  assign we = ce && (v5 || we_q);

  // vector kept for the second pass
  coeff_t vx, vy, vz;

  // mux layer and multiplier layer
  logic [N_MULT-1:0][WORD_W-1:0] mx, my, pr;

  // matrix coefficients from the first-pass products
  // pr: 0 q0q0, 1 q1q1, 2 q2q2, 3 q3q3, 4 q0q1, 5 q0q2, 6 q0q3, 7 q1q2, 8 q1q3, 9 q2q3
  logic [8:0][WORD_W-1:0] m;
  always_comb begin
    m[0] = pr[0] - pr[1] - pr[2] + pr[3];
    m[1] = (pr[4] - pr[9]) <<< 1;
    m[2] = (pr[5] + pr[8]) <<< 1;
    m[3] = -((pr[4] + pr[9]) <<< 1);
    m[4] = pr[0] - pr[1] + pr[2] - pr[3];
    m[5] = (pr[6] - pr[7]) <<< 1;
    m[6] = (pr[8] - pr[5]) <<< 1;
    m[7] = -((pr[6] + pr[7]) <<< 1);
    m[8] = pr[0] + pr[1] - pr[2] - pr[3];
  end

  always_ff @(posedge clk) begin
    if (start) begin
      coeff_t q0, q1, q2, q3;
      q0 = b.f[0];
      q1 = b.f[1];
      q2 = b.f[2];
      q3 = b.f[3];
      vx <= a.f[0];
      vy <= a.f[1];
      vz <= a.f[2];
      mx[0] <= q0; my[0] <= q0;
      mx[1] <= q1; my[1] <= q1;
      mx[2] <= q2; my[2] <= q2;
      mx[3] <= q3; my[3] <= q3;
      mx[4] <= q0; my[4] <= q1;
      mx[5] <= q0; my[5] <= q2;
      mx[6] <= q0; my[6] <= q3;
      mx[7] <= q1; my[7] <= q2;
      mx[8] <= q1; my[8] <= q3;
      mx[9] <= q2; my[9] <= q3;
    end else if (v2) begin
      for (int n = 0; n < 9; n++) mx[n] <= m[n];
      my[0] <= vx; my[1] <= vy; my[2] <= vz;
      my[3] <= vx; my[4] <= vy; my[5] <= vz;
      my[6] <= vx; my[7] <= vy; my[8] <= vz;
      mx[9] <= '0;
      my[9] <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (v1 || v3)
      for (int n = 0; n < N_MULT; n++) pr[n] <= fxmul(mx[n], my[n], FRAC_BITS);
  end

  // sums
  coeff_t rx, ry, rz;
  always_ff @(posedge clk) begin
    if (v4) begin
      rx <= pr[0] + pr[1] + pr[2];
      ry <= pr[3] + pr[4] + pr[5];
      rz <= pr[6] + pr[7] + pr[8];
    end
  end

  always_comb begin
    res        = '0;
    res.nparts = 2'd1;
    res.p1.tag = TAG_VECTOR;
    res.p1.f[0] = rx;
    res.p1.f[1] = ry;
    res.p1.f[2] = rz;
  end

endmodule
