// ModifiedBooth: unsigned integer multiplier with radix-4 (modified) Booth
// recoding.
//
// The multiplier is zero-extended to an even number of bits and scanned in
// overlapping groups of three bits (b[2i+1], b[2i], b[2i-1], with b[-1] = 0).
// Each group is recoded into one digit d_i in {-2, -1, 0, +1, +2}, so that
// b = sum d_i * 4**i. Each digit selects a partial product d_i * a (zero,
// a, 2a, or their two's complement), which is shifted by 2i places; the
// partial products are then summed. This halves the number of partial
// products against a shift-and-add multiplier: for WIDTH = 24 there are 13
// instead of 24. The use of radix-4 Booth recoding follows the design; the
// plain adder chain that sums the partial products is this implementation's
// choice (a synthesis tool may map it to a carry-save tree).
// Interface: multiplicand, multiplier (unsigned, WIDTH bits) ->
// product (unsigned, 2*WIDTH bits, exact).
// Timing: purely combinational.
module ModifiedBooth #(
  parameter int unsigned WIDTH = 24   // significand width of binary32
) (
  input  logic [WIDTH-1:0]   multiplicand,
  input  logic [WIDTH-1:0]   multiplier,
  output logic [2*WIDTH-1:0] product
);

  // Digits needed for an unsigned multiplier: its top group must see a 0 sign.
  localparam int unsigned NDIG = (WIDTH + 2) / 2;
  localparam int unsigned BW   = 2 * NDIG + 1;   // extended multiplier incl. b[-1]
  localparam int unsigned PW   = 2 * WIDTH + 2;  // partial product / sum width

  typedef enum logic [2:0] {
    D_ZERO, D_POS1, D_POS2, D_NEG1, D_NEG2
  } booth_digit_e;

  logic [BW-1:0]  bext;
  booth_digit_e   digit [NDIG];
  logic [PW-1:0]  pp    [NDIG];
  logic [PW-1:0]  acc;

  always_comb begin
    bext = '0;
    bext[WIDTH:1] = multiplier;     // bext[0] is b[-1] = 0
  end

  // Booth recoding of each overlapping 3-bit group.
  always_comb begin
    for (int i = 0; i < NDIG; i++) begin
      unique case (bext[2*i +: 3])
        3'b000, 3'b111: digit[i] = D_ZERO;
        3'b001, 3'b010: digit[i] = D_POS1;
        3'b011:         digit[i] = D_POS2;
        3'b100:         digit[i] = D_NEG2;
        default:        digit[i] = D_NEG1;   // 3'b101, 3'b110
      endcase
    end
  end

  // Partial-product selection, weighting by 4**i and summation.
  always_comb begin
    logic [PW-1:0] a1, a2, sel;
    a1  = PW'(multiplicand);
    a2  = a1 << 1;
    acc = '0;
    for (int i = 0; i < NDIG; i++) begin
      unique case (digit[i])
        D_POS1:  sel = a1;
        D_POS2:  sel = a2;
        D_NEG1:  sel = ~a1 + 1'b1;
        D_NEG2:  sel = ~a2 + 1'b1;
        default: sel = '0;
      endcase
      pp[i] = sel << (2 * i);
      acc   = acc + pp[i];
    end
  end

  assign product = acc[2*WIDTH-1:0];

endmodule
