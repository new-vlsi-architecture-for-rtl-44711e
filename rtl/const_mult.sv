// const_mult -- multiplier with a constant, built as a carry-save adder array.
//
// p = round(a * C / 2^CF). For every set bit i of the constant C a copy of a shifted
// left by i is added; the copies are compressed with 3:2 carry-save adders, so only the
// final sum and carry vectors go through one carry-propagate adder. A rounding term
// 2^(CF-1) is the first addend. The original architecture asks for multipliers with a constant and
// names a carry-save step in its design flow; the shift-and-add structure, the
// rounding and the fixed-point format are this design's choice.
//
// Interface: a (signed, W bits) -> p (signed, W bits), purely combinational.
// C must be non-negative; the caller keeps |a * C / 2^CF| within W bits.
module const_mult #(
  parameter int          W  = 32,
  parameter int          CF = 24,
  parameter int unsigned C  = 23726566
) (
  input  logic signed [W-1:0] a,
  output logic signed [W-1:0] p
);
  localparam int CW = $clog2(C + 1) + 1;  // bits of the constant that can be set
  localparam int WX = W + ((CW > CF) ? CW : CF) + 1;  // wide enough for a * C and the shift

  logic signed [WX-1:0] a_ext;
  logic        [WX-1:0] s, c, t, addend;
  logic        [WX-1:0] sum;  // only bits CF .. CF+W-1 form the result

  assign a_ext = WX'(a);

  always_comb begin
    s = (CF > 0) ? (WX'(1) << (CF - 1)) : '0;  // rounding term
    c = '0;
    for (int i = 0; i < CW; i++) begin
      if (C[i]) begin
        addend = a_ext << i;
        t      = s ^ c ^ addend;
        c      = ((s & c) | (s & addend) | (c & addend)) << 1;
        s      = t;
      end
    end
    sum = s + c;
  end

  assign p = sum[CF +: W];

endmodule
