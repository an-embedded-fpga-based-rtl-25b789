// clifford_multiplier: multiplier functional unit of the Clifford ALU.
//
// Computes the geometric product of two 4D homogeneous elements and, by
// keeping only one grade of it, the outer product and the left and right
// contractions. Any product the unit supports involves at most a four-field
// and a six-field operand, so it uses a four-word register, a six-word
// register and a bank of 24 fixed-point multipliers that forms every
// word-by-word sub-product at once. The pipeline is:
//
//   1 pre-swap       operands into the four/six-word registers; the first
//                    operand goes to the six-word register when it is a
//                    bivector, or a vector/trivector times a scalar or
//                    pseudoscalar. The sign mask is looked up here.
//   2 multiply       24 products, each shifted right by FRAC_BITS.
//   3 sign           products whose mask bit is set are negated.
//   4 sum and route  the scalar, vector or bivector sub-unit adds the signed
//                    products into one or two result parts.
//   5 post-swap      the six fields of the bivector part are reversed for
//                    vector x trivector, trivector x vector, bivector x
//                    pseudoscalar and pseudoscalar x bivector.
//   6 select         (combinational) whole product, or the part of grade
//                    ga+gb (outer), gb-ga (left contraction) or ga-gb (right
//                    contraction); a zero part when that grade is absent.
//
// Interface: `ce` (product_ce) is a level held by the ALU controller; the
// unit starts once on its rising edge and raises `we` (product_we) in the
// cycle after the post-swap register loads, five clocks later, holding it,
// with `res` valid, until `ce` falls. Bivector x bivector needs 36
// multipliers and is not executed: it returns no parts and the error flag. Fields a tag does not use are ignored.
//
// The stage order, the 24-multiplier bank, the pre/post-swap rules and the
// three sub-units follow the document. The fixed-point format, the sign-mask
// contents, the part order and the handling of an absent grade are this
// design's choices.
//
// The operand IDs reach the pre-swap variables but are not used by the
// product (the ALU labels the result with the result ID); lint reports
// them as unused bits.
module clifford_multiplier
  import cliffosor_pkg::*;
#(
  parameter int unsigned FRAC_BITS = FRAC_BITS_DEFAULT
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ce,
  input  opcode_t  op,
  input  homog_t   a,
  input  homog_t   b,
  output logic     we,
  output result_t  res
);

  typedef enum logic [1:0] {M_SCALAR, M_VECTOR, M_BIVECTOR, M_NONE} mode_t;

  // Number of fields a tag uses.
  function automatic int unsigned nfields(input tag_t t);
    if (is_single(t)) return 1;
    if (is_quad(t))   return 4;
    return 6;
  endfunction

  // ---------------------------------------------------------------- control
  logic    started;
  logic    v1, v2, v3, v4, v5;
  logic    we_q;
  logic    start;
  assign start = ce && !started;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      started <= 1'b0;
      {v1, v2, v3, v4, v5} <= '0;
      we_q <= 1'b0;
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

  // product_we: up in the cycle after the post-swap register is loaded.
  assign we = ce && (v5 || we_q);

  // ------------------------------------------------------- stage 1: pre-swap
  logic                   swap_c;
  logic [23:0]            mask_c;
  mask_generator u_mask (.tag_a(a.tag), .tag_b(b.tag), .swap(swap_c), .mask(mask_c));

  logic [3:0][WORD_W-1:0] r4;
  logic [5:0][WORD_W-1:0] r6;
  tag_t                   s1_tag4, s1_tag6, s1_ta, s1_tb;
  opcode_t                s1_op;
  logic [23:0]            s1_mask;
  mode_t                  s1_mode;
  logic                   s1_post;

  always_ff @(posedge clk) begin
    if (start) begin
      homog_t x4, x6;
      x4 = swap_c ? b : a;
      x6 = swap_c ? a : b;
      for (int k = 0; k < 4; k++) r4[k] <= (k < nfields(x4.tag)) ? x4.f[k] : '0;
      for (int k = 0; k < 6; k++) r6[k] <= (k < nfields(x6.tag)) ? x6.f[k] : '0;
      s1_tag4 <= x4.tag;
      s1_tag6 <= x6.tag;
      s1_ta   <= a.tag;
      s1_tb   <= b.tag;
      s1_op   <= op;
      s1_mask <= mask_c;
      if (a.tag == TAG_BIVECTOR && b.tag == TAG_BIVECTOR)    s1_mode <= M_NONE;
      else if (is_single(a.tag) || is_single(b.tag))         s1_mode <= M_SCALAR;
      else if (is_quad(a.tag) && is_quad(b.tag))             s1_mode <= M_VECTOR;
      else                                                   s1_mode <= M_BIVECTOR;
      s1_post <= (is_quad(a.tag) && is_quad(b.tag) && a.tag != b.tag) ||
                 (a.tag == TAG_BIVECTOR && b.tag == TAG_PSEUDO) ||
                 (a.tag == TAG_PSEUDO && b.tag == TAG_BIVECTOR);
    end
  end

  // ------------------------------------------------------- stage 2: multiply
  logic [23:0][WORD_W-1:0] prod;
  logic [23:0]             s2_mask;
  tag_t                    s2_tag4, s2_tag6, s2_ta, s2_tb;
  opcode_t                 s2_op;
  mode_t                   s2_mode;
  logic                    s2_post;

  always_ff @(posedge clk) begin
    if (v1) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 6; j++)
          prod[6*i+j] <= fxmul(r4[i], r6[j], FRAC_BITS);
      s2_mask <= s1_mask;
      s2_tag4 <= s1_tag4;
      s2_tag6 <= s1_tag6;
      s2_ta   <= s1_ta;
      s2_tb   <= s1_tb;
      s2_op   <= s1_op;
      s2_mode <= s1_mode;
      s2_post <= s1_post;
    end
  end

  // ----------------------------------------------------------- stage 3: sign
  logic [23:0][WORD_W-1:0] sprod;
  tag_t                    s3_tag4, s3_tag6, s3_ta, s3_tb;
  opcode_t                 s3_op;
  mode_t                   s3_mode;
  logic                    s3_post;

  always_ff @(posedge clk) begin
    if (v2) begin
      for (int n = 0; n < 24; n++)
        sprod[n] <= s2_mask[n] ? -coeff_t'(prod[n]) : coeff_t'(prod[n]);
      s3_tag4 <= s2_tag4;
      s3_tag6 <= s2_tag6;
      s3_ta   <= s2_ta;
      s3_tb   <= s2_tb;
      s3_op   <= s2_op;
      s3_mode <= s2_mode;
      s3_post <= s2_post;
    end
  end

  // -------------------------------------------------- stage 4: sum and route
  homog_t su_p, vu_p1, vu_p2, bu_p1, bu_p2;
  scalar_unit   u_scalar (.sp(sprod), .tag4(s3_tag4), .tag6(s3_tag6), .part(su_p));
  vector_unit   u_vector (.sp(sprod), .tag4(s3_tag4), .tag6(s3_tag6), .part1(vu_p1), .part2(vu_p2));
  bivector_unit u_bivec  (.sp(sprod), .tag4(s3_tag4), .part1(bu_p1), .part2(bu_p2));

  homog_t     s4_p1, s4_p2;
  logic [1:0] s4_n;
  logic       s4_err;
  tag_t       s4_ta, s4_tb;
  opcode_t    s4_op;
  logic       s4_post;

  always_ff @(posedge clk) begin
    if (v3) begin
      s4_p2  <= '0;
      s4_err <= 1'b0;
      case (s3_mode)
        M_SCALAR:   begin s4_p1 <= su_p;  s4_n <= 2'd1; end
        M_VECTOR:   begin s4_p1 <= vu_p1; s4_p2 <= vu_p2; s4_n <= 2'd2; end
        M_BIVECTOR: begin s4_p1 <= bu_p1; s4_p2 <= bu_p2; s4_n <= 2'd2; end
        default:    begin s4_p1 <= '0;    s4_n <= 2'd0; s4_err <= 1'b1; end
      endcase
      s4_ta   <= s3_ta;
      s4_tb   <= s3_tb;
      s4_op   <= s3_op;
      s4_post <= s3_post;
    end
  end

  // ------------------------------------------------------ stage 5: post-swap
  homog_t     s5_p1, s5_p2;
  logic [1:0] s5_n;
  logic       s5_err;
  tag_t       s5_ta, s5_tb;
  opcode_t    s5_op;

  function automatic homog_t reverse_fields(input homog_t h);
    homog_t r;
    r = h;
    for (int k = 0; k < 6; k++) r.f[k] = h.f[5-k];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (v4) begin
      s5_p1  <= (s4_post && s4_p1.tag == TAG_BIVECTOR) ? reverse_fields(s4_p1) : s4_p1;
      s5_p2  <= (s4_post && s4_p2.tag == TAG_BIVECTOR) ? reverse_fields(s4_p2) : s4_p2;
      s5_n   <= s4_n;
      s5_err <= s4_err;
      s5_ta  <= s4_ta;
      s5_tb  <= s4_tb;
      s5_op  <= s4_op;
    end
  end

  // ------------------------------------------- stage 6: result selection
  always_comb begin
    logic [2:0] ga, gb;
    logic [3:0] target;
    logic       in_range;
    ga = tag_grade(s5_ta);
    gb = tag_grade(s5_tb);
    target   = '0;
    in_range = 1'b1;
    case (s5_op)
      OP_OUTER: target = {1'b0, ga} + {1'b0, gb};
      OP_LCONT: begin target = {1'b0, gb} - {1'b0, ga}; in_range = (gb >= ga); end
      OP_RCONT: begin target = {1'b0, ga} - {1'b0, gb}; in_range = (ga >= gb); end
      default:  target = '0;
    endcase
    if (target > 4'd4) in_range = 1'b0;

    res        = '0;
    res.error  = s5_err;
    if (s5_op == OP_GP || s5_err) begin
      res.nparts = s5_n;
      res.p1     = s5_p1;
      res.p2     = s5_p2;
    end else begin
      res.nparts = 2'd1;
      if (in_range && s5_n >= 2'd1 && {1'b0, tag_grade(s5_p1.tag)} == target)
        res.p1 = s5_p1;
      else if (in_range && s5_n == 2'd2 && {1'b0, tag_grade(s5_p2.tag)} == target)
        res.p1 = s5_p2;
      else if (in_range)
        res.p1.tag = grade_tag(target[2:0]);
      else
        res.p1.tag = TAG_SCALAR;
    end
  end

endmodule
