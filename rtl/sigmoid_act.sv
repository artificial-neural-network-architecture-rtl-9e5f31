// sigmoid_act: activation function unit, y = 1 / (1 + e^-z), plus the binary
// threshold decision of a threshold neuron.
//
// z is a signed fixed-point number with ZF fractional bits. The sigmoid is
// approximated piecewise linearly with power-of-two slopes (the PLAN scheme),
// so only shifts, adds and compares are needed:
//   |z| >= 5            : 1
//   2.375 <= |z| < 5    : |z|/32 + 0.84375
//   1 <= |z| < 2.375    : |z|/8  + 0.625
//   0 <= |z| < 1        : |z|/4  + 0.5
//   z < 0               : 1 - f(|z|)
// The maximum deviation from the exact sigmoid is below 0.02. The result is
// computed exactly with ZF+5 fractional bits, then rounded to y, an unsigned
// Q1.YF number (1.0 = 2^YF). fire = 1 when z >= 0, i.e. the binary output of
// a threshold neuron, equal to y >= 0.5. Combinational.
// The sigmoid as activation function follows the published design; the
// approximation, the number formats and the fire output are this design's
// choices. Needs ZF >= 3, ZW >= ZF + 4 and YF < ZF + 5.
module sigmoid_act #(
  parameter int unsigned ZW = 41,
  parameter int unsigned ZF = 16,
  parameter int unsigned YF = 8
) (
  input  logic signed [ZW-1:0] z,
  output logic        [YF:0]   y,
  output logic                 fire
);
  localparam int unsigned IW = ZF + 7;        // internal width, LSB = 2^-(ZF+5)
  localparam int unsigned SH = ZF + 5 - YF;   // rounding shift

  localparam logic [ZW-1:0] Z_5     = ZW'(5)  << ZF;
  localparam logic [ZW-1:0] Z_2_375 = ZW'(19) << (ZF - 3);
  localparam logic [ZW-1:0] Z_1     = ZW'(1)  << ZF;
  localparam logic [IW-1:0] ONE     = IW'(32) << ZF;
  localparam logic [IW-1:0] K_84375 = IW'(27) << ZF;
  localparam logic [IW-1:0] K_625   = IW'(20) << ZF;
  localparam logic [IW-1:0] K_5     = IW'(16) << ZF;

  logic          neg;
  logic [ZW-1:0] mag;
  logic [IW-1:0] zc, y_pos, y_full, y_rnd;

  always_comb begin
    neg = z[ZW-1];
    mag = neg ? ZW'(-z) : ZW'(z);
    zc  = IW'(mag[ZF+2:0]);            // only used below |z| = 5 < 2^(ZF+3)
    if (mag >= Z_5)          y_pos = ONE;
    else if (mag >= Z_2_375) y_pos = zc + K_84375;
    else if (mag >= Z_1)     y_pos = (zc << 2) + K_625;
    else                     y_pos = (zc << 3) + K_5;
    y_full = neg ? ONE - y_pos : y_pos;
    y_rnd  = y_full + (IW'(1) << (SH - 1));
    y      = y_rnd[SH +: YF + 1];
    fire   = ~neg;
  end
endmodule
