// FP16 fused multiply-add: y = round(a * b + c), IEEE 754 binary16.
//
// This is the arithmetic unit of every compute lane. The accelerator computes in
// FP16 because a 16-bit fixed-point product would need a wider accumulator,
// while FP16 keeps weights, inputs and partial sums in 16 bits. How the unit is
// built inside is this design's own choice: the exact product a*b (22-bit
// significand) and the addend c are both placed on one 82-bit fixed-point grid
// whose least significant bit weighs 2^-48 (the smallest product of two FP16
// subnormals), so their sum is exact. The sum is then normalised and rounded
// once, to nearest with ties to even. Subnormal inputs and outputs are handled
// in full; results beyond the FP16 range become infinity.
//
// Special values: any NaN operand, 0 * inf, and inf + (-inf) give the quiet NaN
// 16'h7E00. An exact zero sum is +0, except that (-0) + (-0) style sums of two
// negative zeros give -0.
//
// Interface and timing: purely combinational, no clock. The lane array places a
// register after it.
module fp16_fma
  import mm_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  input  fp16_t c,
  output fp16_t y
);

  localparam int unsigned FW = 82;          // fixed-point grid width, LSB = 2^-48
  localparam fp16_t QNAN = 16'h7E00;

  logic        sa, sb, sc, sp;
  logic [4:0]  ea, eb, ec;
  logic [10:0] siga, sigb, sigc;
  logic        a_nan, b_nan, c_nan, a_inf, b_inf, c_inf, a_zero, b_zero;
  logic [21:0] sigp;
  logic [6:0]  shp;                         // product shift onto the grid
  logic [5:0]  shc;                         // addend shift onto the grid
  logic [FW-1:0] fp, fc, mag;
  logic        smag;
  int          lead;                        // index of the leading one of mag
  int          lsb;                         // grid index of the result's LSB
  logic [11:0] mant;                        // kept bits (at most 11 used)
  logic        rnd, sticky, inc;
  logic [4:0]  efield;
  logic [15:0] packed_res;                  // {exponent, fraction} before rounding
  logic [15:0] rounded;
  fp16_t       y_fin;

  always_comb begin
    sa = a[15]; ea = a[14:10];
    sb = b[15]; eb = b[14:10];
    sc = c[15]; ec = c[14:10];
    a_nan = (ea == 5'h1F) && (a[9:0] != 0);
    b_nan = (eb == 5'h1F) && (b[9:0] != 0);
    c_nan = (ec == 5'h1F) && (c[9:0] != 0);
    a_inf = (ea == 5'h1F) && (a[9:0] == 0);
    b_inf = (eb == 5'h1F) && (b[9:0] == 0);
    c_inf = (ec == 5'h1F) && (c[9:0] == 0);
    a_zero = (a[14:0] == 0);
    b_zero = (b[14:0] == 0);
    sp = sa ^ sb;

    // significands with the hidden bit; subnormals use exponent 1
    siga = {(ea != 0), a[9:0]};
    sigb = {(eb != 0), b[9:0]};
    sigc = {(ec != 0), c[9:0]};

    // value(a*b) = sigp * 2^(ea'+eb'-50); grid LSB is 2^-48
    sigp = siga * sigb;
    shp  = 7'((ea == 0 ? 5'd1 : ea)) + 7'((eb == 0 ? 5'd1 : eb)) - 7'd2;
    // value(c) = sigc * 2^(ec'-25)  ->  shift ec' + 23
    shc  = 6'((ec == 0 ? 5'd1 : ec)) + 6'd23;
    fp   = FW'(sigp) << shp;
    fc   = FW'(sigc) << shc;

    // exact signed sum in sign-magnitude form
    if (sp == sc) begin
      mag  = fp + fc;
      smag = sp;
    end else if (fp >= fc) begin
      mag  = fp - fc;
      smag = sp;
    end else begin
      mag  = fc - fp;
      smag = sc;
    end

    lead = 0;
    for (int i = 0; i < FW; i++)
      if (mag[i]) lead = i;

    // Grid index 34 weighs 2^-14, the smallest normal; index 24 weighs 2^-24.
    if (lead >= 34) begin
      lsb    = lead - 10;
      efield = 5'(lead - 33 > 31 ? 31 : lead - 33);
    end else begin
      lsb    = 24;
      efield = 5'd0;
    end
    mant   = 12'(mag >> lsb);
    rnd    = mag[lsb-1];
    sticky = 1'b0;
    for (int i = 0; i < FW; i++)
      if (i < lsb - 1 && mag[i]) sticky = 1'b1;
    inc = rnd && (sticky || mant[0]);

    // exponent field and fraction side by side: a carry out of the fraction
    // bumps the exponent, which is what rounding needs
    packed_res = {1'b0, efield, mant[9:0]};
    if (lead - 33 > 30 && lead >= 34)
      rounded = 16'h7C00;                       // far beyond the range
    else
      rounded = packed_res + 16'(inc);
    if (rounded >= 16'h7C00)
      y_fin = {smag, 15'h7C00};
    else if (mag == 0)
      y_fin = {sp & sc, 15'h0};
    else
      y_fin = {smag, rounded[14:0]};

    // special operands
    if (a_nan || b_nan || c_nan)
      y = QNAN;
    else if ((a_inf && b_zero) || (b_inf && a_zero))
      y = QNAN;
    else if (a_inf || b_inf) begin
      if (c_inf && (sc != sp)) y = QNAN;
      else                     y = {sp, 15'h7C00};
    end else if (c_inf)
      y = c;
    else
      y = y_fin;
  end

endmodule
