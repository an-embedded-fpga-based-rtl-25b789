// cliffosor_pkg: types, encodings and helper functions shared by the
// CliffoSor geometric-algebra coprocessor.
//
// A 4D homogeneous element (scalar, vector, bivector, trivector or
// pseudoscalar) is a 3-bit tag plus six 32-bit blade coefficients, fields
// A..F. Which blade each field holds is fixed by the tag (table below); the
// blade is named by a 4-bit mask with bit 0 standing for e1. Dual elements
// differ only in the tag's most significant bit, and the masks of a
// vector's fields are the complements of the masks of the trivector's
// fields in the same position, so multiplying by the pseudoscalar never
// reorders vector/trivector fields.
//
//   tag   element       A     B     C     D     E     F
//   000   scalar        0000
//   001   vector        0001  0010  0100  1000
//   010   bivector      0011  0101  1001  0110  1010  1100
//   101   trivector     1110  1101  1011  0111
//   100   pseudoscalar  1111
//
// The tag codes, the field order, the instruction word and the operand
// header layout follow the document's format tables. The opcode values,
// the fixed-point position of the coefficients (FRAC_BITS) and the status
// word of the result vector are this design's own choices.
package cliffosor_pkg;

  localparam int unsigned WORD_W    = 32;
  // Fraction bits of a coefficient; products are shifted right by this.
  localparam int unsigned FRAC_BITS_DEFAULT = 16;

  typedef logic signed [WORD_W-1:0] coeff_t;

  typedef enum logic [2:0] {
    TAG_SCALAR    = 3'b000,
    TAG_VECTOR    = 3'b001,
    TAG_BIVECTOR  = 3'b010,
    TAG_PSEUDO    = 3'b100,
    TAG_TRIVECTOR = 3'b101
  } tag_t;

  typedef enum logic [3:0] {
    OP_GP    = 4'd0,  // geometric product
    OP_OUTER = 4'd1,  // outer product
    OP_LCONT = 4'd2,  // left contraction
    OP_RCONT = 4'd3,  // right contraction
    OP_ADD   = 4'd4,  // sum
    OP_SUB   = 4'd5,  // difference
    OP_ROT   = 4'd6   // 3D rotation of operand A by rotor operand B
  } opcode_t;

  // INSTRUCTION word: N/U[31:28], B id[27:20], A id[19:12], result id[11:4], opcode[3:0]
  typedef struct packed {
    logic [3:0] unused;
    logic [7:0] id_b;
    logic [7:0] id_a;
    logic [7:0] id_r;
    logic [3:0] opcode;
  } instr_t;

  // Operand HEADER word: not used[31:11], operand id[10:3], tag[2:0]
  typedef struct packed {
    logic [20:0] unused;
    logic [7:0]  id;
    logic [2:0]  tag;
  } header_t;

  // One homogeneous element: f[0] is field A, f[5] field F.
  typedef struct packed {
    logic [7:0]              id;
    tag_t                    tag;
    logic [5:0][WORD_W-1:0]  f;
  } homog_t;

  // What a functional unit hands to the result register.
  typedef struct packed {
    logic [1:0] nparts;  // 0, 1 or 2 homogeneous parts are valid
    logic       error;   // operation not executed by the hardware
    homog_t     p2;
    homog_t     p1;
  } result_t;

  // Grade of a tag.
  function automatic logic [2:0] tag_grade(input tag_t t);
    case (t)
      TAG_SCALAR:    return 3'd0;
      TAG_VECTOR:    return 3'd1;
      TAG_BIVECTOR:  return 3'd2;
      TAG_TRIVECTOR: return 3'd3;
      default:       return 3'd4;
    endcase
  endfunction

  // Tag of a grade (0..4).
  function automatic tag_t grade_tag(input logic [2:0] g);
    case (g)
      3'd0:    return TAG_SCALAR;
      3'd1:    return TAG_VECTOR;
      3'd2:    return TAG_BIVECTOR;
      3'd3:    return TAG_TRIVECTOR;
      default: return TAG_PSEUDO;
    endcase
  endfunction

  // Is the element one with a single field (scalar or pseudoscalar)?
  function automatic logic is_single(input tag_t t);
    return (t == TAG_SCALAR) || (t == TAG_PSEUDO);
  endfunction

  // Is the element one with four fields (vector or trivector)?
  function automatic logic is_quad(input tag_t t);
    return (t == TAG_VECTOR) || (t == TAG_TRIVECTOR);
  endfunction

  // Blade bit mask of field k (0..5) of an element with tag t.
  function automatic logic [3:0] blade_mask(input tag_t t, input int unsigned k);
    logic [3:0] m;
    m = 4'b0000;
    case (t)
      TAG_VECTOR:    if (k < 4) m = 4'(1 << k);
      TAG_TRIVECTOR: if (k < 4) m = ~4'(1 << k);
      TAG_PSEUDO:    m = 4'b1111;
      TAG_BIVECTOR:
        case (k)
          0: m = 4'b0011;
          1: m = 4'b0101;
          2: m = 4'b1001;
          3: m = 4'b0110;
          4: m = 4'b1010;
          default: m = 4'b1100;
        endcase
      default: m = 4'b0000;
    endcase
    return m;
  endfunction

  // 1 when the product of blades ma*mb (Euclidean signature) is negative:
  // parity of the transpositions that bring the basis vectors into order.
  function automatic logic blade_neg(input logic [3:0] ma, input logic [3:0] mb);
    int unsigned n;
    n = 0;
    for (int i = 0; i < 4; i++)
      if (mb[i])
        for (int j = i + 1; j < 4; j++)
          if (ma[j]) n++;
    return n[0];
  endfunction

  // Fixed-point product: full 64-bit product, arithmetic shift, truncation.
  function automatic coeff_t fxmul(input coeff_t a, input coeff_t b, input int unsigned frac);
    logic signed [2*WORD_W-1:0] p;
    p = 64'(a) * 64'(b);
    p = p >>> frac;
    return p[WORD_W-1:0];
  endfunction

  // Pre-swap rule of the multiplier: the first operand goes to the six-word
  // register when it is a bivector, or when it has four fields and the
  // second operand has one.
  function automatic logic needs_preswap(input tag_t a, input tag_t b);
    return (a == TAG_BIVECTOR) || (is_quad(a) && is_single(b));
  endfunction

  // Bivector field (Table order) of the pair of basis indices {i, j}, i != j.
  function automatic int unsigned pair_field(input int unsigned i, input int unsigned j);
    logic [3:0] m;
    m = 4'(1 << i) | 4'(1 << j);
    case (m)
      4'b0011: return 0;
      4'b0101: return 1;
      4'b1001: return 2;
      4'b0110: return 3;
      4'b1010: return 4;
      default: return 5;
    endcase
  endfunction

endpackage
