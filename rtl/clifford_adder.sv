// clifford_adder: adder functional unit of the Clifford ALU.
//
// Adds or subtracts two 4D homogeneous elements. When both have the same tag
// the result is one element of that type, summed field by field. Otherwise
// the sum cannot be simplified and the result is the two elements side by
// side: part 1 is operand A, part 2 operand B (negated for a difference).
//
// Three registered stages: fetching (operands and opcode captured, unused
// fields cleared), two's complement (operand B negated for a difference) and
// additions. The composition of the result is combinational behind the
// addition register. `ce` (sum_ce) is a level; the unit starts once on its
// rising edge and raises `we` (sum_we) in the cycle after the addition
// register loads, holding it until `ce` falls. Arithmetic wraps at 32 bits.
//
// The stages and the same-type/composition rule follow the document; the
// part order for a composition is this design's choice.
module clifford_adder
  import cliffosor_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ce,
  input  logic     sub,      // 1: difference A - B
  input  homog_t   a,
  input  homog_t   b,
  output logic     we,
  output result_t  res
);

  function automatic homog_t clear_unused(input homog_t h);
    homog_t r;
    int unsigned n;
    r = h;
    n = is_single(h.tag) ? 1 : (is_quad(h.tag) ? 4 : 6);
    for (int k = 0; k < 6; k++) if (k >= n) r.f[k] = '0;
    return r;
  endfunction

  logic started, v1, v2, v3, we_q, start;
  assign start = ce && !started;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {started, v1, v2, v3, we_q} <= '0;
    end else begin
      started <= ce;
      v1 <= start;
      v2 <= v1;
      v3 <= v2;
      we_q <= ce && (we_q || v3);
    end
  end
  assign we = ce && (v3 || we_q);

  // stage 1: fetching
  homog_t f_a, f_b;
  logic   f_sub;
  always_ff @(posedge clk) begin
    if (start) begin
      f_a   <= clear_unused(a);
      f_b   <= clear_unused(b);
      f_sub <= sub;
    end
  end

  // stage 2: two's complement of operand B for a difference
  homog_t c_a, c_b;
  always_ff @(posedge clk) begin
    if (v1) begin
      c_a <= f_a;
      c_b <= f_b;
      if (f_sub)
        for (int k = 0; k < 6; k++) c_b.f[k] <= -coeff_t'(f_b.f[k]);
    end
  end

  // stage 3: additions
  homog_t s_a, s_b, s_sum;
  logic   s_same;
  always_ff @(posedge clk) begin
    if (v2) begin
      s_a    <= c_a;
      s_b    <= c_b;
      s_same <= (c_a.tag == c_b.tag);
      s_sum  <= c_a;
      for (int k = 0; k < 6; k++) s_sum.f[k] <= coeff_t'(c_a.f[k]) + coeff_t'(c_b.f[k]);
    end
  end

  // composition of the result
  always_comb begin
    res = '0;
    if (s_same) begin
      res.nparts = 2'd1;
      res.p1     = s_sum;
    end else begin
      res.nparts = 2'd2;
      res.p1     = s_a;
      res.p2     = s_b;
    end
  end

endmodule
